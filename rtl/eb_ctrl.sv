// eb_ctrl: controller of an elastic buffer (an elastic FIFO of capacity two
// whose storage is the master/slave latch pair of a datapath register).
//
// SELF channels: a token moves on a channel in a cycle where valid = 1 and
// stop = 0 (transfer); valid = 1 with stop = 1 is a retry, and the sender
// must offer the same token again in the next cycle (persistence).
//
// The controller is the three-state machine empty / half / full:
//   empty: v_out = 0, accepts a token (goes to half);
//   half : v_out = 1; if the output is stopped and a new token arrives the
//          old one stays in the slave latch and the new one in the master
//          latch (goes to full); otherwise tokens stream through;
//   full : v_out = 1 and s_in = 1; leaves to half when the output transfers.
// v_out and s_in are decoded from the state register only, so the buffer cuts
// every combinational path between its input and output channels; the
// forward and backward latencies are one cycle.
//
// Latch enables for the attached double_latch:
//   en1 (master, used in the low clock phase)  = input transfer this cycle;
//   en2 (slave, used in the high clock phase)  = no retry on the output in
//        the previous cycle. en2 is held by an active-low latch, so it is
//        stable across the rising edge and through the high phase.
// The state is kept in flip-flops (a latch pair with nothing between them);
// the document allows either form for this controller. With INIT_TOKEN = 1
// the buffer leaves reset in the half state, offering the register's init
// value as its first token, which is how a register of the original circuit
// presents its reset value in cycle 0; this reset state is this design's
// choice.
// Lint note: verilator reports NOLATCH ("no latches detected") for the en2
// block although en2 does hold its value during the high clock phase; the
// block is a level-sensitive latch by intent and is written as one.
module eb_ctrl
  import elastic_pkg::*;
#(
  parameter bit INIT_TOKEN = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic v_in,
  output logic s_in,
  output logic v_out,
  input  logic s_out,
  output logic en1,
  output logic en2
);

  eb_state_t state_q, state_d;
  logic      xfer_in, xfer_out;

  assign v_out    = (state_q != EB_EMPTY);
  assign s_in     = (state_q == EB_FULL);
  assign xfer_in  = v_in && !s_in;
  assign xfer_out = v_out && !s_out;
  assign en1      = xfer_in;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      EB_EMPTY: if (xfer_in) state_d = EB_HALF;
      EB_HALF: begin
        if (xfer_in && !xfer_out)      state_d = EB_FULL;
        else if (!xfer_in && xfer_out) state_d = EB_EMPTY;
      end
      EB_FULL:  if (xfer_out) state_d = EB_HALF;
      default:  state_d = EB_EMPTY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= INIT_TOKEN ? EB_HALF : EB_EMPTY;
    else     state_q <= state_d;
  end

  // Slave enable: sampled at the end of the low phase, held during the high
  // phase in which the slave latch is transparent.
  always_latch begin
    if (rst)
      en2 = 1'b1;
    else if (!clk)
      en2 = !(v_out && s_out);
  end

  // SELF persistence: a retried token is offered again in the next cycle.
  a_persist : assert property (@(posedge clk) disable iff (rst)
    (v_out && s_out) |=> v_out);
  // A full buffer never accepts a token.
  a_no_overflow : assert property (@(posedge clk) disable iff (rst)
    (state_q == EB_FULL) |-> !xfer_in);

endmodule
