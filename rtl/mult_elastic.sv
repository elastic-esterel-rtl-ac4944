// mult_elastic: elastic W x W -> 2W multiplier pipelined in four stages,
// used to study how the number of input channels affects throughput.
//
// The second operand B is split into four W/4-bit parts B0 (low) .. B3.
// Stage k (k = 1..4) adds A * Bk-1 << (k-1)*W/4 to the partial product, so
// part Bk-1 travels through k registers before it is used: each part has
// its own pipeline depth, and therefore its own number of tokens in flight.
//   stage 1: ACC1 = A*B0;                 A1 = A;  B1_1, B2_1, B3_1 = B1, B2, B3
//   stage 2: ACC2 = ACC1 + A1*B1_1 << W/4; A2 = A1; B2_2, B3_2 = B2_1, B3_1
//   stage 3: ACC3 = ACC2 + A2*B2_2 << W/2; A3 = A2; B3_3 = B3_2
//   stage 4: ACC4 = ACC3 + A3*B3_3 << 3W/4                -> output P
// All registers reset to 0, so P delivers four 0 tokens and then A*B of the
// first input token, and so on (latency four tokens).
// N_CH selects how many SELF input channels the five input values share:
//   5: A, B0, B1, B2, B3 each have their own valid/stop;
//   2: channel 0 carries A, channel 1 carries all of B;
//   1: one channel carries everything.
// in_valid/in_stop are indexed by channel. Merged channels fork to every
// register that reads one of their values, so fewer joins have to wait for
// unsynchronised inputs. The structure (W, four byte-wise stages of
// different depth, 5/2/1 channels) follows the document; the stage
// equations are this design's reading of it.
module mult_elastic #(
  parameter int unsigned W    = 32,
  parameter int unsigned N_CH = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [W-1:0]      A,
  input  logic [W-1:0]      B,
  input  logic [N_CH-1:0]   in_valid,
  output logic [N_CH-1:0]   in_stop,
  output logic [2*W-1:0]    P,
  output logic              valid_P,
  input  logic              stop_P
);

  localparam int unsigned Q     = W / 4;
  localparam int unsigned N_REG = 13;
  localparam int unsigned N_SRC = N_CH + N_REG;
  localparam int unsigned R_ACC1 = 0, R_A1 = 1, R_B1_1 = 2, R_B2_1 = 3, R_B3_1 = 4,
                          R_ACC2 = 5, R_A2 = 6, R_B2_2 = 7, R_B3_2 = 8,
                          R_ACC3 = 9, R_A3 = 10, R_B3_3 = 11, R_ACC4 = 12;

  initial begin
    assert (N_CH == 5 || N_CH == 2 || N_CH == 1)
      else $error("mult_elastic: N_CH must be 5, 2 or 1");
    assert (W % 4 == 0) else $error("mult_elastic: W must be a multiple of 4");
  end

  // Channel carrying input value v (0 = A, 1..4 = B0..B3).
  function automatic int unsigned ch(input int unsigned v);
    if (N_CH == 5)      return v;
    else if (N_CH == 2) return (v == 0) ? 0 : 1;
    else                return 0;
  endfunction

  function automatic int unsigned rs(input int unsigned r);
    return N_CH + r;
  endfunction

  function automatic logic [N_REG-1:0][N_SRC-1:0] reg_dep();
    logic [N_REG-1:0][N_SRC-1:0] m = '0;
    m[R_ACC1][ch(0)] = 1'b1;          m[R_ACC1][ch(1)] = 1'b1;
    m[R_A1][ch(0)]   = 1'b1;
    m[R_B1_1][ch(2)] = 1'b1;
    m[R_B2_1][ch(3)] = 1'b1;
    m[R_B3_1][ch(4)] = 1'b1;
    m[R_ACC2][rs(R_ACC1)] = 1'b1; m[R_ACC2][rs(R_A1)] = 1'b1; m[R_ACC2][rs(R_B1_1)] = 1'b1;
    m[R_A2][rs(R_A1)]     = 1'b1;
    m[R_B2_2][rs(R_B2_1)] = 1'b1;
    m[R_B3_2][rs(R_B3_1)] = 1'b1;
    m[R_ACC3][rs(R_ACC2)] = 1'b1; m[R_ACC3][rs(R_A2)] = 1'b1; m[R_ACC3][rs(R_B2_2)] = 1'b1;
    m[R_A3][rs(R_A2)]     = 1'b1;
    m[R_B3_3][rs(R_B3_2)] = 1'b1;
    m[R_ACC4][rs(R_ACC3)] = 1'b1; m[R_ACC4][rs(R_A3)] = 1'b1; m[R_ACC4][rs(R_B3_3)] = 1'b1;
    return m;
  endfunction

  function automatic logic [0:0][N_SRC-1:0] out_dep();
    logic [0:0][N_SRC-1:0] m = '0;
    m[0][rs(R_ACC4)] = 1'b1;
    return m;
  endfunction

  logic [N_REG-1:0] en1, en2;

  elastic_control #(
    .N_IN(N_CH), .N_REG(N_REG), .N_OUT(1),
    .REG_DEP(reg_dep()), .OUT_DEP(out_dep()), .REG_INIT('1)
  ) u_ctrl (
    .clk(clk), .rst(rst),
    .in_valid(in_valid), .in_stop(in_stop),
    .out_valid(valid_P), .out_stop(stop_P),
    .en1(en1), .en2(en2)
  );

  logic [2*W-1:0] acc1_q, acc2_q, acc3_q, acc4_q, acc1_d, acc2_d, acc3_d, acc4_d;
  logic [W-1:0]   a1_q, a2_q, a3_q;
  logic [Q-1:0]   b11_q, b21_q, b31_q, b22_q, b32_q, b33_q;

  always_comb begin
    acc1_d = (2*W)'(A) * (2*W)'(B[Q-1:0]);
    acc2_d = acc1_q + (((2*W)'(a1_q) * (2*W)'(b11_q)) << Q);
    acc3_d = acc2_q + (((2*W)'(a2_q) * (2*W)'(b22_q)) << (2*Q));
    acc4_d = acc3_q + (((2*W)'(a3_q) * (2*W)'(b33_q)) << (3*Q));
  end

  assign P = acc4_q;

  double_latch #(.W(2*W)) u_acc1 (.clk(clk), .rst(rst), .en1(en1[R_ACC1]), .en2(en2[R_ACC1]),
    .init('0), .d(acc1_d), .q(acc1_q));
  double_latch #(.W(W)) u_a1 (.clk(clk), .rst(rst), .en1(en1[R_A1]), .en2(en2[R_A1]),
    .init('0), .d(A), .q(a1_q));
  double_latch #(.W(Q)) u_b11 (.clk(clk), .rst(rst), .en1(en1[R_B1_1]), .en2(en2[R_B1_1]),
    .init('0), .d(B[2*Q-1:Q]), .q(b11_q));
  double_latch #(.W(Q)) u_b21 (.clk(clk), .rst(rst), .en1(en1[R_B2_1]), .en2(en2[R_B2_1]),
    .init('0), .d(B[3*Q-1:2*Q]), .q(b21_q));
  double_latch #(.W(Q)) u_b31 (.clk(clk), .rst(rst), .en1(en1[R_B3_1]), .en2(en2[R_B3_1]),
    .init('0), .d(B[4*Q-1:3*Q]), .q(b31_q));

  double_latch #(.W(2*W)) u_acc2 (.clk(clk), .rst(rst), .en1(en1[R_ACC2]), .en2(en2[R_ACC2]),
    .init('0), .d(acc2_d), .q(acc2_q));
  double_latch #(.W(W)) u_a2 (.clk(clk), .rst(rst), .en1(en1[R_A2]), .en2(en2[R_A2]),
    .init('0), .d(a1_q), .q(a2_q));
  double_latch #(.W(Q)) u_b22 (.clk(clk), .rst(rst), .en1(en1[R_B2_2]), .en2(en2[R_B2_2]),
    .init('0), .d(b21_q), .q(b22_q));
  double_latch #(.W(Q)) u_b32 (.clk(clk), .rst(rst), .en1(en1[R_B3_2]), .en2(en2[R_B3_2]),
    .init('0), .d(b31_q), .q(b32_q));

  double_latch #(.W(2*W)) u_acc3 (.clk(clk), .rst(rst), .en1(en1[R_ACC3]), .en2(en2[R_ACC3]),
    .init('0), .d(acc3_d), .q(acc3_q));
  double_latch #(.W(W)) u_a3 (.clk(clk), .rst(rst), .en1(en1[R_A3]), .en2(en2[R_A3]),
    .init('0), .d(a2_q), .q(a3_q));
  double_latch #(.W(Q)) u_b33 (.clk(clk), .rst(rst), .en1(en1[R_B3_3]), .en2(en2[R_B3_3]),
    .init('0), .d(b32_q), .q(b33_q));

  double_latch #(.W(2*W)) u_acc4 (.clk(clk), .rst(rst), .en1(en1[R_ACC4]), .en2(en2[R_ACC4]),
    .init('0), .d(acc4_d), .q(acc4_q));

endmodule
