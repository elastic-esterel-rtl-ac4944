// tb_pipe_elastic: latency-equivalence test of the elastic pipeline.
//
// A random input sequence (status and value of In1 and In2 per reaction) is
// run through a cycle model of the original synchronous pipeline, written
// here from its equations, giving the expected Out sequence. The same
// sequence is then fed to the elastic circuit through four independent
// random producers, while a random consumer stops the output. Every Out_data
// token must equal the expected value, in order. A 5 x 5 grid of valid/stop rate
// configurations are run, each after a reset. With no bubbles and no stops
// the circuit must deliver one token per cycle: NTOK tokens from the first to
// the last output transfer in exactly NTOK cycles.
module tb_pipe_elastic;
  localparam int unsigned N    = 3;
  localparam int unsigned NTOK = 5000;
  localparam int unsigned NCFG = 25;  // 5 valid rates x 5 stop rates
  localparam int unsigned NREP = 5;   // runs per configuration

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Stimulus and expected output.
  logic         s1 [NTOK], s2 [NTOK];
  logic [N-1:0] d1 [NTOK], d2 [NTOK];
  logic [N+2:0] exp_out [NTOK];

  int unsigned ntok, vpct, spct;
  int unsigned idx [4];
  logic        pv [4], ps [4];
  int unsigned pretry [4];

  logic         In1, In2;
  logic [N-1:0] In1_data, In2_data;
  logic [N+2:0] Out_data;
  logic         valid_Out_data, stop_Out_data;
  int unsigned  ocount, oretry, operr;

  assign In1      = s1[idx[0] % NTOK];
  assign In1_data = d1[idx[1] % NTOK];
  assign In2      = s2[idx[2] % NTOK];
  assign In2_data = d2[idx[3] % NTOK];

  pipe_elastic #(.N(N)) dut (
    .clk(clk), .rst(rst),
    .In1(In1), .valid_In1(pv[0]), .stop_In1(ps[0]),
    .In1_data(In1_data), .valid_In1_data(pv[1]), .stop_In1_data(ps[1]),
    .In2(In2), .valid_In2(pv[2]), .stop_In2(ps[2]),
    .In2_data(In2_data), .valid_In2_data(pv[3]), .stop_In2_data(ps[3]),
    .Out_data(Out_data), .valid_Out_data(valid_Out_data), .stop_Out_data(stop_Out_data)
  );

  for (genvar i = 0; i < 4; i++) begin : g_prod
    elastic_producer u_p (
      .clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct),
      .stop(ps[i]), .valid(pv[i]), .idx(idx[i]), .n_retry(pretry[i]));
  end

  elastic_consumer #(.W(N+3)) u_c (
    .clk(clk), .rst(rst), .stop_pct(spct), .valid(valid_Out_data),
    .data(Out_data), .stop(stop_Out_data), .count(ocount),
    .n_retry(oretry), .persist_err(operr));

  // Compare every output token with the expected sequence; note the cycles
  // of the first and last transfer.
  int unsigned ncyc = 0, first_cyc = 0, last_cyc = 0;
  always @(negedge clk) begin
    ncyc++;
    if (!rst && valid_Out_data && !stop_Out_data && ocount < NTOK) begin
      if (ocount == 0) first_cyc = ncyc;
      last_cyc = ncyc;
      checks++;
      if (Out_data !== exp_out[ocount]) begin
        failures++;
        if (failures < 10)
          $display("token %0d: Out_data=%0d expected %0d", ocount, Out_data, exp_out[ocount]);
      end
    end
  end

  // Watchdog.
  initial begin
    #(10 * 20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_in_stalls, n_out_retries;

  initial begin
    logic [N-1:0] r1, r2;
    logic [N:0]   f1;
    logic [N+2:0] o;
    ntok = NTOK; vpct = 100; spct = 0;
    repeat (NREP) begin  // new random data each time
      for (int t = 0; t < NTOK; t++) begin
        s1[t] = 1'($urandom); s2[t] = 1'($urandom);
        d1[t] = N'($urandom); d2[t] = N'($urandom);
      end
      // Synchronous reference: one reaction per cycle.
      r1 = '0; r2 = '0; f1 = '0; o = '0;
      for (int t = 0; t < NTOK; t++) begin
        exp_out[t] = o;
        o  = {f1, 2'b00};
        f1 = {1'b0, r1} + {1'b0, r2};
        r1 = s1[t] ? d1[t] : '0;
        r2 = s2[t] ? d2[t] : '0;
      end
      n_in_stalls = 0; n_out_retries = 0;
      for (int c = 0; c < NCFG; c++) begin
        int unsigned cyc;
        vpct = 100 - 20 * (c / 5); spct = 20 * (c % 5);
        rst = 1'b1;
        repeat (3) @(posedge clk);
        rst <= 1'b0;
        cyc = 0;
        while (ocount < NTOK) begin
          @(negedge clk);
          if (!rst) begin
            cyc++;
            for (int i = 0; i < 4; i++) if (pv[i] && ps[i]) n_in_stalls++;
          end
        end
        n_out_retries += oretry;
        checks++;
        if (operr != 0) begin
          failures++;
          $display("cfg %0d: %0d persistence errors on Out_data", c, operr);
        end
        if (c == 0) begin
          checks++;
          if (last_cyc - first_cyc + 1 != NTOK) begin
            failures++;
            $display("full rate: %0d tokens took %0d cycles, expected %0d", NTOK,
                     last_cyc - first_cyc + 1, NTOK);
          end
        end
        $display("cfg %0d valid=%0d%% stop=%0d%%: %0d tokens in %0d cycles, rate %0.2f",
                 c, vpct, spct, NTOK, cyc, real'(NTOK) / real'(cyc));
        @(posedge clk);
      end
    end
    @(posedge clk);  // let the last loop iteration settle before the summary
    checks++;
    if (n_in_stalls == 0 || n_out_retries == 0) begin
      failures++;
      $display("backpressure never exercised: input stalls %0d, output retries %0d",
               n_in_stalls, n_out_retries);
    end
    $display("input stall cycles %0d, output retry cycles %0d", n_in_stalls, n_out_retries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
