// tb_parallel_emit_elastic: latency-equivalence test of the elastic
// parallel-emit circuit.
// A random sequence of reactions (status and value of In1 and In2) is run
// through a cycle model of the synchronous program written here from its
// Esterel semantics, giving the expected Out1/Out1_data/Out2/Out2_data
// sequences. The same inputs are then fed through four random producers and
// the four outputs are drained by random consumers; every output channel's
// token stream must equal its expected sequence. The stimulus is checked to
// contain reactions where one thread has finished and ignores its input
// while the other still waits (the loop synchronisation), and the run must
// see stopped inputs and retried outputs.
module tb_parallel_emit_elastic;
  localparam int unsigned N    = 3;
  localparam int unsigned NTOK = 5000;
  localparam int unsigned NCFG = 25;  // 5 valid rates x 5 stop rates
  localparam int unsigned NREP = 5;   // runs per configuration
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         s1 [NTOK], s2 [NTOK];
  logic [N-1:0] d1 [NTOK], d2 [NTOK];
  logic [N-1:0] exp [4][NTOK];   // Out1, Out1_data, Out2, Out2_data

  int unsigned ntok = NTOK, vpct, spct;
  int unsigned idx [4], pretry [4];
  logic        pv [4], ps [4];
  logic        ov [4], os [4];
  logic [N-1:0] od [4];
  int unsigned ocnt [4], oret [4], operr [4];
  logic Out1, Out2;
  logic [N-1:0] Out1_data, Out2_data;

  parallel_emit_elastic #(.N(N)) dut (
    .clk(clk), .rst(rst),
    .In1(s1[idx[0] % NTOK]), .valid_In1(pv[0]), .stop_In1(ps[0]),
    .In1_data(d1[idx[1] % NTOK]), .valid_In1_data(pv[1]), .stop_In1_data(ps[1]),
    .In2(s2[idx[2] % NTOK]), .valid_In2(pv[2]), .stop_In2(ps[2]),
    .In2_data(d2[idx[3] % NTOK]), .valid_In2_data(pv[3]), .stop_In2_data(ps[3]),
    .Out1(Out1), .valid_Out1(ov[0]), .stop_Out1(os[0]),
    .Out1_data(Out1_data), .valid_Out1_data(ov[1]), .stop_Out1_data(os[1]),
    .Out2(Out2), .valid_Out2(ov[2]), .stop_Out2(os[2]),
    .Out2_data(Out2_data), .valid_Out2_data(ov[3]), .stop_Out2_data(os[3]));

  assign od[0] = N'(Out1);
  assign od[1] = Out1_data;
  assign od[2] = N'(Out2);
  assign od[3] = Out2_data;

  for (genvar i = 0; i < 4; i++) begin : g_env
    elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct),
      .stop(ps[i]), .valid(pv[i]), .idx(idx[i]), .n_retry(pretry[i]));
    elastic_consumer #(.W(N)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(ov[i]),
      .data(od[i]), .stop(os[i]), .count(ocnt[i]), .n_retry(oret[i]), .persist_err(operr[i]));
  end

  always @(negedge clk) begin
    if (!rst)
      for (int i = 0; i < 4; i++)
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


  int unsigned n_sync, n_stall, n_retry;

  initial begin
    logic boot, w1, w2, p, go, a1, a2, e1, e2, nw1, nw2;
    logic [N-1:0] v1, v2;
    n_sync = 0; n_stall = 0; n_retry = 0;
    repeat (NREP) begin  // new random data each time
      for (int t = 0; t < NTOK; t++) begin
        // Bias towards absent inputs so that threads wait for each other.
        s1[t] = ($urandom_range(99) < 45); s2[t] = ($urandom_range(99) < 45);
        d1[t] = N'($urandom); d2[t] = N'($urandom);
      end
      boot = 1; w1 = 0; w2 = 0; p = 0; v1 = 0; v2 = 0;
      for (int t = 0; t < NTOK; t++) begin
        go = boot | p;
        a1 = go | w1;  a2 = go | w2;
        e1 = a1 & s1[t]; e2 = a2 & s2[t];
        if (e1) v1 = d1[t];
        if (e2) v2 = d2[t];
        if ((s1[t] && !a1) || (s2[t] && !a2)) n_sync++;
        exp[0][t] = N'(e1); exp[1][t] = v1; exp[2][t] = N'(e2); exp[3][t] = v2;
        nw1 = a1 & ~s1[t]; nw2 = a2 & ~s2[t];
        p = (go | w1 | w2) & ~nw1 & ~nw2;
        w1 = nw1; w2 = nw2; boot = 0;
      end
      checks++;
      if (n_sync == 0) begin failures++; $display("stimulus never ignores an input"); end
      $display("reactions with an input ignored by a finished thread: %0d", n_sync);
      for (int c = 0; c < NCFG; c++) begin
        vpct = 100 - 20 * (c / 5); spct = 20 * (c % 5);
        rst = 1'b1;
        repeat (3) @(posedge clk);
        rst <= 1'b0;
        @(negedge clk);
        while (ocnt[0] < NTOK || ocnt[1] < NTOK || ocnt[2] < NTOK || ocnt[3] < NTOK) begin
          @(negedge clk);
          for (int i = 0; i < 4; i++) if (pv[i] && ps[i]) n_stall++;
        end
        for (int i = 0; i < 4; i++) begin
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
