// tb_gcd_elastic: latency-equivalence test of the elastic gcd circuit.
// A random sequence of reactions (a, b, restart) is run through a cycle
// model of the synchronous program written here from its Esterel semantics,
// giving the expected d and d_data sequences; the elastic circuit, fed by
// random producers and drained by random consumers, must produce the same
// token streams. Every result emitted by the model is also checked against
// the true gcd of the operands loaded at the start of that computation.
// The stimulus must contain finished computations, restarts that abort a
// running computation and restarts from the idle state.
module tb_gcd_elastic;
  localparam int unsigned W    = 32;
  localparam int unsigned NTOK = 5000;
  localparam int unsigned NCFG = 25;  // 5 valid rates x 5 stop rates
  localparam int unsigned NREP = 5;   // runs per configuration
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] as [NTOK], bs [NTOK];
  logic         rs [NTOK];
  logic [W-1:0] exp [2][NTOK];

  int unsigned ntok = NTOK, vpct, spct;
  int unsigned idx [3], pretry [3];
  logic        pv [3], ps [3], ov [2], os [2];
  logic [W-1:0] od [2];
  int unsigned ocnt [2], oret [2], operr [2];
  logic         d;
  logic [W-1:0] d_data;

  gcd_elastic #(.W(W)) dut (
    .clk(clk), .rst(rst),
    .a(as[idx[0] % NTOK]), .valid_a(pv[0]), .stop_a(ps[0]),
    .b(bs[idx[1] % NTOK]), .valid_b(pv[1]), .stop_b(ps[1]),
    .restart(rs[idx[2] % NTOK]), .valid_restart(pv[2]), .stop_restart(ps[2]),
    .d(d), .valid_d(ov[0]), .stop_d(os[0]),
    .d_data(d_data), .valid_d_data(ov[1]), .stop_d_data(os[1]));

  assign od[0] = W'(d);
  assign od[1] = d_data;

  for (genvar i = 0; i < 3; i++) begin : g_p
    elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct),
      .stop(ps[i]), .valid(pv[i]), .idx(idx[i]), .n_retry(pretry[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_c
    elastic_consumer #(.W(W)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(ov[i]),
      .data(od[i]), .stop(os[i]), .count(ocnt[i]), .n_retry(oret[i]), .persist_err(operr[i]));
  end

  always @(negedge clk) begin
    if (!rst)
      for (int i = 0; i < 2; i++)
        if (ov[i] && !os[i] && ocnt[i] < NTOK) begin
          checks++;
          if (od[i] !== exp[i][ocnt[i]]) begin
            failures++;
            if (failures < 10)
              $display("channel %0d token %0d: %0d expected %0d", i, ocnt[i], od[i], exp[i][ocnt[i]]);
          end
        end
  end

  initial begin
    #(10 * 20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] gcd_ref(input logic [W-1:0] x, input logic [W-1:0] y);
    while (y != 0) begin
      logic [W-1:0] t;
      t = x % y; x = y; y = t;
    end
    return x;
  endfunction


  int unsigned n_done, n_abort, n_idle_restart, n_stall, n_retry;

  initial begin
    logic boot, run, idle, start, active, dd;
    logic [W-1:0] r0, r1, x0, x1, l, s, dv, ga, gb;
    n_done = 0; n_abort = 0; n_idle_restart = 0; n_stall = 0; n_retry = 0;
    repeat (NREP) begin  // new random data each time
      for (int t = 0; t < NTOK; t++) begin
        as[t] = W'($urandom_range(1, 200));
        bs[t] = W'($urandom_range(1, 200));
        rs[t] = ($urandom_range(99) < 4);
      end
      boot = 1; run = 0; idle = 0; r0 = 0; r1 = 0; dv = 0; ga = 0; gb = 0;
      for (int t = 0; t < NTOK; t++) begin
        start  = boot | ((run | idle) & rs[t]);
        if (run && rs[t]) n_abort++;
        if (idle && rs[t]) n_idle_restart++;
        active = start | run;
        if (start) begin ga = as[t]; gb = bs[t]; end
        x0 = start ? as[t] : r0;
        x1 = start ? bs[t] : r1;
        l  = (x0 >= x1) ? x0 : x1;
        s  = (x0 >= x1) ? x1 : x0;
        dd = active & (l - s == 0);
        if (dd) begin
          dv = s;
          n_done++;
          checks++;
          if (s != gcd_ref(ga, gb)) begin
            failures++;
            $display("reference model: gcd(%0d,%0d) gave %0d", ga, gb, s);
          end
        end
        exp[0][t] = W'(dd);
        exp[1][t] = dv;
        if (active) begin r0 = l - s; r1 = s; end
        idle = (dd & ~start) | (idle & ~rs[t]);
        run  = active & ~(dd & ~start);
        boot = 0;
      end
      checks++;
      if (n_done == 0 || n_abort == 0 || n_idle_restart == 0) begin
        failures++;
        $display("stimulus lacks a case: done %0d, aborted %0d, idle restarts %0d", n_done, n_abort, n_idle_restart);
      end
      $display("results %0d, aborting restarts %0d, restarts from idle %0d", n_done, n_abort, n_idle_restart);
      for (int c = 0; c < NCFG; c++) begin
        vpct = 100 - 20 * (c / 5); spct = 20 * (c % 5);
        rst = 1'b1;
        repeat (3) @(posedge clk);
        rst <= 1'b0;
        @(negedge clk);
        while (ocnt[0] < NTOK || ocnt[1] < NTOK) begin
          @(negedge clk);
          for (int i = 0; i < 3; i++) if (pv[i] && ps[i]) n_stall++;
        end
        for (int i = 0; i < 2; i++) begin
          n_retry += oret[i];
          checks++;
          if (operr[i] != 0) begin failures++; $display("persistence error on output %0d", i); end
        end
        @(posedge clk);
      end
    end
    @(posedge clk);  // let the last loop iteration settle before the summary
    checks++;
    if (n_stall == 0 || n_retry == 0) begin
      failures++;
      $display("backpressure not exercised: stalls %0d retries %0d", n_stall, n_retry);
    end
    $display("input stall cycles %0d, output retries %0d", n_stall, n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
