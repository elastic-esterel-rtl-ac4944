// pipe_elastic: elastic version of a small Esterel pipeline.
//
// Original (synchronous) behaviour, one reaction per clock cycle:
//   Reg1 <= In1 present ? ?In1 : 0        (N bits, init 0)
//   Reg2 <= In2 present ? ?In2 : 0        (N bits, init 0)
//   F1   <= Reg1 + Reg2                   (N+1 bits, init 0)
//   Out  <= F1 * 4                        (N+3 bits, init 0), output value
//   Boot <= 0                             (init 1, the compiler's boot bit)
// Elastic version: the registers are double_latch pairs and an
// elastic_control layer (one elastic module per register) drives their
// enables. Every Esterel signal has its own SELF channel for its status
// and for its value (In1, In1_data, ...), each with valid/stop wires; Out
// is value-only, so it has only Out_data. The output stream of Out_data
// tokens equals the per-cycle Out sequence of the synchronous circuit
// (0, 0, 0, then 4*(In1+In2) of the first reaction, ...), whatever bubbles
// the producers insert and whatever stops the consumer applies.
// Latency: a token on In1/In2 reaches Out_data three transfers later; with
// no bubbles and no stops the pipeline moves one token per cycle.
// The program, the register set and the channel naming follow the document;
// the channel-per-dependency netlist is derived here from the equations.
// Lint note: Boot's output is not read by this datapath (verilator reports
// it unused); the register is kept because it belongs to the compiled
// circuit and takes part in the control layer like every other register.
module pipe_elastic #(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           In1,
  input  logic           valid_In1,
  output logic           stop_In1,
  input  logic [N-1:0]   In1_data,
  input  logic           valid_In1_data,
  output logic           stop_In1_data,
  input  logic           In2,
  input  logic           valid_In2,
  output logic           stop_In2,
  input  logic [N-1:0]   In2_data,
  input  logic           valid_In2_data,
  output logic           stop_In2_data,
  output logic [N+2:0]   Out_data,
  output logic           valid_Out_data,
  input  logic           stop_Out_data
);

  // Source numbering: inputs, then registers.
  localparam int unsigned N_IN  = 4;
  localparam int unsigned N_REG = 5;
  localparam int unsigned N_OUT = 1;
  localparam int unsigned N_SRC = N_IN + N_REG;
  localparam int unsigned I_IN1 = 0, I_IN1D = 1, I_IN2 = 2, I_IN2D = 3;
  localparam int unsigned R_REG1 = 0, R_REG2 = 1, R_F1 = 2, R_OUT = 3, R_BOOT = 4;

  function automatic logic [N_REG-1:0][N_SRC-1:0] reg_dep();
    logic [N_REG-1:0][N_SRC-1:0] m = '0;
    m[R_REG1][I_IN1]          = 1'b1;
    m[R_REG1][I_IN1D]         = 1'b1;
    m[R_REG2][I_IN2]          = 1'b1;
    m[R_REG2][I_IN2D]         = 1'b1;
    m[R_F1][N_IN + R_REG1]    = 1'b1;
    m[R_F1][N_IN + R_REG2]    = 1'b1;
    m[R_OUT][N_IN + R_F1]     = 1'b1;
    m[R_BOOT][N_IN + R_BOOT]  = 1'b1;
    return m;
  endfunction

  function automatic logic [N_OUT-1:0][N_SRC-1:0] out_dep();
    logic [N_OUT-1:0][N_SRC-1:0] m = '0;
    m[0][N_IN + R_OUT] = 1'b1;
    return m;
  endfunction

  logic [N_REG-1:0] en1, en2;

  elastic_control #(
    .N_IN(N_IN), .N_REG(N_REG), .N_OUT(N_OUT),
    .REG_DEP(reg_dep()), .OUT_DEP(out_dep()), .REG_INIT('1)
  ) u_ctrl (
    .clk(clk), .rst(rst),
    .in_valid({valid_In2_data, valid_In2, valid_In1_data, valid_In1}),
    .in_stop ({stop_In2_data, stop_In2, stop_In1_data, stop_In1}),
    .out_valid(valid_Out_data),
    .out_stop (stop_Out_data),
    .en1(en1), .en2(en2)
  );

  // Datapath: the original combinational equations.
  logic [N-1:0] reg1_q, reg2_q, reg1_d, reg2_d;
  logic [N:0]   f1_q, f1_d;
  logic [N+2:0] out_q, out_d;
  logic         boot_q;

  always_comb begin
    reg1_d = In1 ? In1_data : '0;
    reg2_d = In2 ? In2_data : '0;
    f1_d   = {1'b0, reg1_q} + {1'b0, reg2_q};
    out_d  = {f1_q, 2'b00};
  end

  double_latch #(.W(N)) u_reg1 (
    .clk(clk), .rst(rst), .en1(en1[R_REG1]), .en2(en2[R_REG1]),
    .init('0), .d(reg1_d), .q(reg1_q));
  double_latch #(.W(N)) u_reg2 (
    .clk(clk), .rst(rst), .en1(en1[R_REG2]), .en2(en2[R_REG2]),
    .init('0), .d(reg2_d), .q(reg2_q));
  double_latch #(.W(N+1)) u_f1 (
    .clk(clk), .rst(rst), .en1(en1[R_F1]), .en2(en2[R_F1]),
    .init('0), .d(f1_d), .q(f1_q));
  double_latch #(.W(N+3)) u_out (
    .clk(clk), .rst(rst), .en1(en1[R_OUT]), .en2(en2[R_OUT]),
    .init('0), .d(out_d), .q(out_q));
  // Boot bit: part of the compiled circuit; nothing in this program reads it.
  double_latch #(.W(1)) u_boot (
    .clk(clk), .rst(rst), .en1(en1[R_BOOT]), .en2(en2[R_BOOT]),
    .init(1'b1), .d(1'b0), .q(boot_q));

  assign Out_data = out_q;

endmodule
