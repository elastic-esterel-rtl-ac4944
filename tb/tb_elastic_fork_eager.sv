// tb_elastic_fork_eager: checks the eager fork with three receivers (one of
// them masked off) under a random producer and random consumers.
// Every active receiver must receive every token exactly once and in order;
// the masked receiver must never see a token; the input token must be
// consumed only once all active receivers have it. It also checks that a
// receiver is served in a cycle in which another receiver is stopped (the
// eager behaviour), and that with no stops one token moves per cycle.
module tb_elastic_fork_eager;
  localparam int unsigned NTOK = 2000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  seq [NTOK];
  int unsigned ntok = NTOK, vpct = 70, spct = 40;
  logic        v_in, s_in;
  logic [3:0]  v_out, s_out;
  int unsigned idx, pretry;
  int unsigned cnt [4], ret [4], perr [4];
  logic [7:0]  data;

  assign data = seq[idx % NTOK];

  elastic_fork_eager #(.N(4)) dut (.clk(clk), .rst(rst), .mask(4'b1011), .v_in(v_in), .s_in(s_in),
    .v_out(v_out), .s_out(s_out));
  elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct), .stop(s_in),
    .valid(v_in), .idx(idx), .n_retry(pretry));
  for (genvar k = 0; k < 4; k++) begin : g_c
    elastic_consumer #(.W(8)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(v_out[k]),
      .data(data), .stop(s_out[k]), .count(cnt[k]), .n_retry(ret[k]), .persist_err(perr[k]));
  end

  int unsigned n_eager = 0;
  always @(negedge clk) begin
    if (!rst) begin
      for (int k = 0; k < 4; k++) begin
        if (v_out[k] && !s_out[k]) begin
          checks++;
          if (k == 2 || data !== seq[cnt[k]]) begin
            failures++;
            if (failures < 10) $display("receiver %0d token %0d: %h expected %h", k, cnt[k], data, seq[cnt[k]]);
          end
        end
      end
      // Served receivers while another active one is stopped.
      if (|(v_out & ~s_out & 4'b1011) && |(v_out & s_out & 4'b1011)) n_eager++;
      // The input token is consumed only when no receiver still lacks it.
      if (v_in && !s_in) begin
        checks++;
        for (int k = 0; k < 4; k++)
          if (k != 2 && cnt[k] + ((v_out[k] && !s_out[k]) ? 1 : 0) != idx + 1) begin
            failures++;
            $display("input token %0d consumed before receiver %0d had it", idx, k);
          end
      end
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NTOK; t++) seq[t] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    while (idx < NTOK - 200) @(negedge clk);
    spct = 0; vpct = 100;
    repeat (5) @(negedge clk);
    begin
      int unsigned i0;
      i0 = idx;
      repeat (100) @(negedge clk);
      checks++;
      if (idx - i0 != 100) begin
        failures++;
        $display("full rate: %0d tokens in 100 cycles", idx - i0);
      end
    end
    while (idx < NTOK) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (cnt[0] != NTOK || cnt[1] != NTOK || cnt[3] != NTOK || cnt[2] != 0) begin
      failures++;
      $display("token counts %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3]);
    end
    checks++;
    if (n_eager == 0 || perr[0] + perr[1] + perr[3] != 0) begin
      failures++;
      $display("eager service seen %0d times, persistence errors %0d", n_eager, perr[0] + perr[1] + perr[3]);
    end
    $display("eager partial deliveries: %0d", n_eager);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
