// double_latch: rising-edge register made of two latches with independent
// enables, the storage element of an elastic datapath.
//
// The master is an active-low latch (transparent in the second, low half of
// the clock cycle) enabled by en1; the slave is an active-high latch
// (transparent in the first, high half of the next cycle) enabled by en2.
// With en1 = en2 = 1 it behaves exactly like a rising-edge flip-flop:
// q during cycle t+1 is d at the end of cycle t. When the elastic buffer
// controller drops en2 the slave keeps the token that is waiting to leave
// while the master takes in the next one, so the pair holds two tokens.
// Timing: en1 must be stable during the low phase, en2 during the high phase.
// rst forces both latches to init (synchronous-style, level-sensitive reset,
// as the elastic flow requires; an asynchronous reset is not offered).
// Lint note: a datapath that feeds a register's output back to its input
// (a state machine) is reported by verilator as circular combinational logic
// (UNOPTFLAT), since each latch looks like a d-to-q path. The two latches
// are open in opposite clock phases, so such a loop is never transparent.
module double_latch #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en1,
  input  logic         en2,
  input  logic [W-1:0] init,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] mid;

  elastic_latch #(.W(W), .ACTIVE_HIGH(1'b0)) u_master (
    .clk(clk), .rst(rst), .en(en1), .init(init), .d(d), .q(mid)
  );

  elastic_latch #(.W(W), .ACTIVE_HIGH(1'b1)) u_slave (
    .clk(clk), .rst(rst), .en(en2), .init(init), .d(mid), .q(q)
  );

endmodule
