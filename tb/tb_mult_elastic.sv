// tb_mult_elastic: latency equivalence and throughput of the elastic
// pipelined multiplier in its three channel granularities.
//
// Three instances (5, 2 and 1 input channels) are run side by side with the
// same operand sequence. Each instance has one random producer per input
// channel and one random consumer on P. The expected P stream is four 0
// tokens (the reset contents of the pipeline) followed by A*B of every
// operand pair in order. For a 5 x 5 grid of producer valid rates
// (0.2 .. 1.0) and consumer stop rates (0.0 .. 0.8) the transfer rate of P
// (tokens per cycle from the end of reset until the NTOK-th token) is
// measured and printed as a table per instance. Checks besides the data:
// with valid rate 1.0 and no stop every instance must run at about one token
// per cycle, and at medium congestion fewer channels must not be slower.
module tb_mult_elastic;
  localparam int unsigned W    = 32;
  localparam int unsigned NTOK = 5000;
  localparam int unsigned NI   = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0]   av [NTOK], bv [NTOK];
  logic [2*W-1:0] exp [NTOK];
  int unsigned ntok = NTOK, vpct, spct;
  int unsigned ocnt [NI], oret [NI], operr [NI], nstall [NI];

  function automatic int unsigned nch(input int unsigned k);
    return (k == 0) ? 5 : (k == 1) ? 2 : 1;
  endfunction

  for (genvar k = 0; k < NI; k++) begin : g_i
    localparam int unsigned NC = nch(k);
    int unsigned idx [NC], pretry [NC];
    logic [NC-1:0] pv, ps;
    logic [W-1:0] a, b;
    logic [2*W-1:0] p;
    logic ov, os;

    // channel carrying operand part v (0 = A, 1..4 = bytes of B)
    function automatic int unsigned chan(input int unsigned v);
      return (NC == 5) ? v : (NC == 2) ? ((v == 0) ? 0 : 1) : 0;
    endfunction

    always_comb begin
      a = av[idx[chan(0)] % NTOK];
      for (int j = 0; j < 4; j++)
        b[j*W/4 +: W/4] = bv[idx[chan(j + 1)] % NTOK][j*W/4 +: W/4];
    end

    mult_elastic #(.W(W), .N_CH(NC)) dut (.clk(clk), .rst(rst), .A(a), .B(b),
      .in_valid(pv), .in_stop(ps), .P(p), .valid_P(ov), .stop_P(os));

    for (genvar c = 0; c < NC; c++) begin : g_p
      elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct),
        .stop(ps[c]), .valid(pv[c]), .idx(idx[c]), .n_retry(pretry[c]));
    end
    elastic_consumer #(.W(2*W)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(ov),
      .data(p), .stop(os), .count(ocnt[k]), .n_retry(oret[k]), .persist_err(operr[k]));

    always @(negedge clk) begin
      if (!rst) begin
        for (int c = 0; c < NC; c++) if (pv[c] && ps[c]) nstall[k]++;
        if (ov && !os && ocnt[k] < NTOK) begin
          checks++;
          if (p !== exp[ocnt[k]]) begin
            failures++;
            if (failures < 10)
              $display("%0d channels, token %0d: %h expected %h", NC, ocnt[k], p, exp[ocnt[k]]);
          end
        end
      end
    end
  end

  initial begin
    #(10 * 10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rate [NI][5][5];

  initial begin
    int unsigned cyc [NI];
    bit all;
    nstall = '{0, 0, 0};
    for (int t = 0; t < NTOK; t++) begin
      av[t] = $urandom;
      bv[t] = $urandom;
      if (t % 97 == 5) begin av[t] = '1; bv[t] = '1; end   // largest product
    end
    for (int t = 0; t < NTOK; t++)
      exp[t] = (t < 4) ? '0 : (2*W)'(av[t-4]) * (2*W)'(bv[t-4]);
    for (int vi = 0; vi < 5; vi++) begin
      for (int si = 0; si < 5; si++) begin
        vpct = 20 * (vi + 1);
        spct = 20 * si;
        rst = 1'b1;
        repeat (3) @(posedge clk);
        rst <= 1'b0;
        cyc = '{0, 0, 0};
        @(negedge clk);
        do begin
          @(negedge clk);
          all = 1;
          for (int k = 0; k < NI; k++)
            if (ocnt[k] < NTOK) begin cyc[k]++; all = 0; end
        end while (!all);
        for (int k = 0; k < NI; k++) begin
          rate[k][vi][si] = real'(NTOK) / real'(cyc[k]);
          checks++;
          if (operr[k] != 0) begin failures++; $display("persistence error, instance %0d", k); end
        end
        @(posedge clk);
      end
    end
    for (int k = 0; k < NI; k++) begin
      $display("transfer rate, %0d input channel(s); rows valid 0.2..1.0, columns stop 0.0..0.8", nch(k));
      for (int vi = 0; vi < 5; vi++)
        $display("  %3.1f: %4.2f %4.2f %4.2f %4.2f %4.2f", 0.2 * (vi + 1),
                 rate[k][vi][0], rate[k][vi][1], rate[k][vi][2], rate[k][vi][3], rate[k][vi][4]);
      checks++;
      if (rate[k][4][0] < 0.98) begin
        failures++;
        $display("instance %0d below full rate without congestion", k);
      end
      checks++;
      if (nstall[k] == 0 && nch(k) > 1) begin
        failures++;
        $display("instance %0d never stalled an input", k);
      end
    end
    // fewer channels synchronise fewer inputs: never noticeably slower
    for (int vi = 0; vi < 5; vi++)
      for (int si = 0; si < 5; si++) begin
        checks++;
        if (rate[2][vi][si] < rate[1][vi][si] - 0.05 || rate[1][vi][si] < rate[0][vi][si] - 0.05) begin
          failures++;
          $display("granularity order violated at valid %0d%% stop %0d%%", 20 * (vi + 1), 20 * si);
        end
      end
    checks++;
    if (!(rate[2][2][0] > rate[0][2][0] + 0.05)) begin
      failures++;
      $display("one channel not faster than five at valid 0.6, stop 0");
    end
    $display("input stall cycles: 5ch %0d, 2ch %0d, 1ch %0d; output retries %0d %0d %0d",
             nstall[0], nstall[1], nstall[2], oret[0], oret[1], oret[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
