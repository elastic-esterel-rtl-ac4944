// gcd_elastic: elastic circuit of an Esterel greatest-common-divisor
// program ("loop ... each restart" around a weakly aborted subtract loop).
//
// Synchronous behaviour (one reaction per cycle). Registers: Boot (init 1),
// Run (the subtract loop is active), Idle (finished, waiting for restart),
// R0, R1 (the two operands) and DV (persistent value of d, init 0).
//   start  = Boot | ((Run | Idle) & restart)   body (re)starts: R0 := a, R1 := b
//   active = start | Run
//   x0, x1 = start ? (a, b) : (R0, R1)
//   l, s   = max(x0, x1), min(x0, x1)
//   R0' = l - s, R1' = s                      (when active, else unchanged)
//   d      = active & (l - s == 0)            emitted with value s
//   Run'   = active & ~(d & ~start)           weak abort on d, not in the
//                                             first reaction of the body
//   Idle'  = (d & ~start) | (Idle & ~restart)
// "restart" is tested only in reactions after the one that started the body
// (non-immediate "each"), and d terminates the body after the reaction in
// which it is emitted (weak abort). When a = b in the first reaction, d is
// emitted but the loop goes on, as the program says.
// Elastic version: six double_latch registers and an elastic_control layer.
// Channels: a, b (value only), restart (status only) in; d (status) and
// d_data (value) out, all with valid/stop.
// The program follows the document; the equations are this design's
// derivation of its circuit, and every register reads every input and every
// state register except Boot (a coarser dependency graph than a compiler
// would extract, which changes throughput, not results).
// Lint note: verilator reports circular combinational logic (UNOPTFLAT)
// through the double_latch registers, because it sees every latch as a
// combinational path from d to q. Each loop here runs from a register output
// through the next-state logic back into the same register's master latch
// and on through its slave latch; the master is open only in the low clock
// phase and the slave only in the high phase, so the loop is never
// transparent end to end. The warning is inherent to latch-pair registers.
module gcd_elastic #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic         valid_a,
  output logic         stop_a,
  input  logic [W-1:0] b,
  input  logic         valid_b,
  output logic         stop_b,
  input  logic         restart,
  input  logic         valid_restart,
  output logic         stop_restart,
  output logic         d,
  output logic         valid_d,
  input  logic         stop_d,
  output logic [W-1:0] d_data,
  output logic         valid_d_data,
  input  logic         stop_d_data
);

  localparam int unsigned N_IN  = 3;
  localparam int unsigned N_REG = 6;
  localparam int unsigned N_OUT = 2;
  localparam int unsigned N_SRC = N_IN + N_REG;
  localparam int unsigned R_BOOT = 0, R_RUN = 1, R_IDLE = 2, R_R0 = 3, R_R1 = 4, R_DV = 5;

  function automatic logic [N_REG-1:0][N_SRC-1:0] reg_dep();
    logic [N_REG-1:0][N_SRC-1:0] m;
    for (int r = 0; r < N_REG; r++) begin
      m[r]             = '1;
      m[r][N_IN + R_DV] = 1'b0;
    end
    m[R_DV][N_IN + R_DV] = 1'b1;
    m[R_BOOT]            = '0;
    m[R_BOOT][N_IN + R_BOOT] = 1'b1;
    return m;
  endfunction

  function automatic logic [N_OUT-1:0][N_SRC-1:0] out_dep();
    logic [N_OUT-1:0][N_SRC-1:0] m;
    m[0]              = '1;
    m[0][N_IN + R_DV] = 1'b0;
    m[1]              = '1;
    return m;
  endfunction

  logic [N_REG-1:0] en1, en2;

  elastic_control #(
    .N_IN(N_IN), .N_REG(N_REG), .N_OUT(N_OUT),
    .REG_DEP(reg_dep()), .OUT_DEP(out_dep()), .REG_INIT('1)
  ) u_ctrl (
    .clk(clk), .rst(rst),
    .in_valid ({valid_restart, valid_b, valid_a}),
    .in_stop  ({stop_restart, stop_b, stop_a}),
    .out_valid({valid_d_data, valid_d}),
    .out_stop ({stop_d_data, stop_d}),
    .en1(en1), .en2(en2)
  );

  logic         boot_q, run_q, idle_q, run_d, idle_d;
  logic [W-1:0] r0_q, r1_q, dv_q, r0_d, r1_d, dv_d;
  logic         start, active, term;
  logic [W-1:0] x0, x1, lg, sm, diff;

  always_comb begin
    start  = boot_q | ((run_q | idle_q) & restart);
    active = start | run_q;
    x0     = start ? a : r0_q;
    x1     = start ? b : r1_q;
    lg     = (x0 >= x1) ? x0 : x1;
    sm     = (x0 >= x1) ? x1 : x0;
    diff   = lg - sm;
    d      = active & (diff == '0);
    term   = d & ~start;
    run_d  = active & ~term;
    idle_d = term | (idle_q & ~restart);
    r0_d   = active ? diff : r0_q;
    r1_d   = active ? sm : r1_q;
    dv_d   = d ? sm : dv_q;
  end

  assign d_data = dv_d;

  double_latch #(.W(1)) u_boot (.clk(clk), .rst(rst), .en1(en1[R_BOOT]), .en2(en2[R_BOOT]),
    .init(1'b1), .d(1'b0), .q(boot_q));
  double_latch #(.W(1)) u_run (.clk(clk), .rst(rst), .en1(en1[R_RUN]), .en2(en2[R_RUN]),
    .init(1'b0), .d(run_d), .q(run_q));
  double_latch #(.W(1)) u_idle (.clk(clk), .rst(rst), .en1(en1[R_IDLE]), .en2(en2[R_IDLE]),
    .init(1'b0), .d(idle_d), .q(idle_q));
  double_latch #(.W(W)) u_r0 (.clk(clk), .rst(rst), .en1(en1[R_R0]), .en2(en2[R_R0]),
    .init('0), .d(r0_d), .q(r0_q));
  double_latch #(.W(W)) u_r1 (.clk(clk), .rst(rst), .en1(en1[R_R1]), .en2(en2[R_R1]),
    .init('0), .d(r1_d), .q(r1_q));
  double_latch #(.W(W)) u_dv (.clk(clk), .rst(rst), .en1(en1[R_DV]), .en2(en2[R_DV]),
    .init('0), .d(dv_d), .q(dv_q));

endmodule
