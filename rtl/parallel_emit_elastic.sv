// parallel_emit_elastic: elastic circuit of an Esterel program with two
// parallel "await immediate In_k; emit Out_k <= ?In_k" threads inside a loop
// that pauses once after both threads have finished.
//
// Synchronous behaviour (one reaction per cycle). Registers: Boot (init 1),
// W1/W2 (thread k is waiting for In_k), P (the pause after the parallel),
// V1/V2 (persistent values of Out1/Out2, init 0). In every reaction:
//   go    = Boot | P                     loop body (re)starts now
//   act_k = go | W_k                     thread k is running
//   Out_k = act_k & In_k                 emitted (status)
//   ?Out_k = Out_k ? ?In_k : V_k         value (persistent)
//   W_k'  = act_k & ~In_k
//   P'    = (go | W1 | W2) & ~W1' & ~W2'  both threads done: pause
// So each Out_k is emitted once per loop iteration, and the pause register
// forces the two input streams to stay in step: one thread cannot take a
// second input before the other has taken one.
// Elastic version: six double_latch registers driven by an elastic_control
// layer built from the dependencies above. Channels: In1, In1_data, In2,
// In2_data (inputs) and Out1, Out1_data, Out2, Out2_data (outputs), each with
// valid/stop. Outputs depend combinationally on inputs (through the output
// interface joins), so a token on Out_k needs the current In tokens.
// The program follows the document; the gate-level equations above are this
// design's own derivation of the Esterel circuit translation.
// Lint note: verilator reports circular combinational logic (UNOPTFLAT)
// through the double_latch registers, because it sees every latch as a
// combinational path from d to q. Each loop here runs from a register output
// through the next-state logic back into the same register's master latch
// and on through its slave latch; the master is open only in the low clock
// phase and the slave only in the high phase, so the loop is never
// transparent end to end. The warning is inherent to latch-pair registers.
module parallel_emit_elastic #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         In1,
  input  logic         valid_In1,
  output logic         stop_In1,
  input  logic [N-1:0] In1_data,
  input  logic         valid_In1_data,
  output logic         stop_In1_data,
  input  logic         In2,
  input  logic         valid_In2,
  output logic         stop_In2,
  input  logic [N-1:0] In2_data,
  input  logic         valid_In2_data,
  output logic         stop_In2_data,
  output logic         Out1,
  output logic         valid_Out1,
  input  logic         stop_Out1,
  output logic [N-1:0] Out1_data,
  output logic         valid_Out1_data,
  input  logic         stop_Out1_data,
  output logic         Out2,
  output logic         valid_Out2,
  input  logic         stop_Out2,
  output logic [N-1:0] Out2_data,
  output logic         valid_Out2_data,
  input  logic         stop_Out2_data
);

  localparam int unsigned N_IN  = 4;
  localparam int unsigned N_REG = 6;
  localparam int unsigned N_OUT = 4;
  localparam int unsigned N_SRC = N_IN + N_REG;
  localparam int unsigned I_IN1 = 0, I_IN1D = 1, I_IN2 = 2, I_IN2D = 3;
  localparam int unsigned R_BOOT = 0, R_W1 = 1, R_W2 = 2, R_P = 3, R_V1 = 4, R_V2 = 5;
  localparam int unsigned S_BOOT = N_IN + R_BOOT, S_W1 = N_IN + R_W1, S_W2 = N_IN + R_W2,
                          S_P = N_IN + R_P, S_V1 = N_IN + R_V1, S_V2 = N_IN + R_V2;

  function automatic logic [N_SRC-1:0] bits(input int unsigned a, b = 0, c = 0, d = 0,
                                            e = 0, f = 0);
    return (N_SRC'(1) << a) | (N_SRC'(1) << b) | (N_SRC'(1) << c) |
           (N_SRC'(1) << d) | (N_SRC'(1) << e) | (N_SRC'(1) << f);
  endfunction

  // Thread k's "emitted" term reads Boot, P, W_k and In_k.
  function automatic logic [N_REG-1:0][N_SRC-1:0] reg_dep();
    logic [N_REG-1:0][N_SRC-1:0] m;
    m[R_BOOT] = bits(S_BOOT);
    m[R_W1]   = bits(S_BOOT, S_P, S_W1, I_IN1);
    m[R_W2]   = bits(S_BOOT, S_P, S_W2, I_IN2);
    m[R_P]    = bits(S_BOOT, S_P, S_W1, S_W2, I_IN1, I_IN2);
    m[R_V1]   = bits(S_BOOT, S_P, S_W1, I_IN1, I_IN1D, S_V1);
    m[R_V2]   = bits(S_BOOT, S_P, S_W2, I_IN2, I_IN2D, S_V2);
    return m;
  endfunction

  function automatic logic [N_OUT-1:0][N_SRC-1:0] out_dep();
    logic [N_OUT-1:0][N_SRC-1:0] m;
    m[0] = bits(S_BOOT, S_P, S_W1, I_IN1);
    m[1] = bits(S_BOOT, S_P, S_W1, I_IN1, I_IN1D, S_V1);
    m[2] = bits(S_BOOT, S_P, S_W2, I_IN2);
    m[3] = bits(S_BOOT, S_P, S_W2, I_IN2, I_IN2D, S_V2);
    return m;
  endfunction

  logic [N_REG-1:0] en1, en2;

  elastic_control #(
    .N_IN(N_IN), .N_REG(N_REG), .N_OUT(N_OUT),
    .REG_DEP(reg_dep()), .OUT_DEP(out_dep()), .REG_INIT('1)
  ) u_ctrl (
    .clk(clk), .rst(rst),
    .in_valid ({valid_In2_data, valid_In2, valid_In1_data, valid_In1}),
    .in_stop  ({stop_In2_data, stop_In2, stop_In1_data, stop_In1}),
    .out_valid({valid_Out2_data, valid_Out2, valid_Out1_data, valid_Out1}),
    .out_stop ({stop_Out2_data, stop_Out2, stop_Out1_data, stop_Out1}),
    .en1(en1), .en2(en2)
  );

  // Datapath.
  logic         boot_q, w1_q, w2_q, p_q;
  logic         w1_d, w2_d, p_d;
  logic [N-1:0] v1_q, v2_q, v1_d, v2_d;
  logic         go, act1, act2;

  always_comb begin
    go   = boot_q | p_q;
    act1 = go | w1_q;
    act2 = go | w2_q;
    Out1 = act1 & In1;
    Out2 = act2 & In2;
    v1_d = Out1 ? In1_data : v1_q;
    v2_d = Out2 ? In2_data : v2_q;
    w1_d = act1 & ~In1;
    w2_d = act2 & ~In2;
    p_d  = (go | w1_q | w2_q) & ~w1_d & ~w2_d;
  end

  assign Out1_data = v1_d;
  assign Out2_data = v2_d;

  double_latch #(.W(1)) u_boot (.clk(clk), .rst(rst), .en1(en1[R_BOOT]), .en2(en2[R_BOOT]),
    .init(1'b1), .d(1'b0), .q(boot_q));
  double_latch #(.W(1)) u_w1 (.clk(clk), .rst(rst), .en1(en1[R_W1]), .en2(en2[R_W1]),
    .init(1'b0), .d(w1_d), .q(w1_q));
  double_latch #(.W(1)) u_w2 (.clk(clk), .rst(rst), .en1(en1[R_W2]), .en2(en2[R_W2]),
    .init(1'b0), .d(w2_d), .q(w2_q));
  double_latch #(.W(1)) u_p (.clk(clk), .rst(rst), .en1(en1[R_P]), .en2(en2[R_P]),
    .init(1'b0), .d(p_d), .q(p_q));
  double_latch #(.W(N)) u_v1 (.clk(clk), .rst(rst), .en1(en1[R_V1]), .en2(en2[R_V1]),
    .init('0), .d(v1_d), .q(v1_q));
  double_latch #(.W(N)) u_v2 (.clk(clk), .rst(rst), .en1(en1[R_V2]), .en2(en2[R_V2]),
    .init('0), .d(v2_d), .q(v2_q));

endmodule
