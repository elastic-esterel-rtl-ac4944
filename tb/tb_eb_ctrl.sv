// tb_eb_ctrl: checks the elastic buffer controller together with the
// double_latch it drives.
// 1. Capacity: after reset the buffer holds its init token; with the output
//    stopped it must accept exactly one more token and then stop its input.
// 2. Order and persistence: random bubbles and stops; the output token
//    stream must be init followed by the input sequence, in order, and a
//    retried token must stay on the channel unchanged.
// 3. Rate: with no bubbles and no stops one token moves per cycle.
// 4. Forward latency: a token entering an empty buffer is offered on the
//    output in the next cycle.
module tb_eb_ctrl;
  localparam int unsigned NTOK = 3000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] seq [NTOK];
  int unsigned ntok = NTOK, vpct = 100, spct = 100;
  logic v_in, s_in, v_out, s_out, en1, en2;
  int unsigned idx, pretry, ocount, oretry, operr;
  logic [7:0] q;

  eb_ctrl #(.INIT_TOKEN(1'b1)) dut (.clk(clk), .rst(rst), .v_in(v_in), .s_in(s_in),
    .v_out(v_out), .s_out(s_out), .en1(en1), .en2(en2));
  double_latch #(.W(8)) u_reg (.clk(clk), .rst(rst), .en1(en1), .en2(en2), .init(8'hA5),
    .d(seq[idx % NTOK]), .q(q));

  elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct), .stop(s_in),
    .valid(v_in), .idx(idx), .n_retry(pretry));
  elastic_consumer #(.W(8)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(v_out),
    .data(q), .stop(s_out), .count(ocount), .n_retry(oretry), .persist_err(operr));

  int unsigned ncyc = 0, first_cyc = 0, last_cyc = 0;
  always @(negedge clk) begin
    ncyc++;
    if (!rst && v_out && !s_out) begin
      logic [7:0] exp;
      exp = (ocount == 0) ? 8'hA5 : seq[ocount - 1];
      if (ocount == 1) first_cyc = ncyc;
      last_cyc = ncyc;
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("token %0d: q=%h expected %h", ocount, q, exp);
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

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%s", what); end
  endtask

  initial begin
    int unsigned taken, seen_full;
    for (int t = 0; t < NTOK; t++) seq[t] = 8'($urandom);
    // 1. Capacity with the output stopped.
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    seen_full = 0;
    repeat (20) begin
      @(negedge clk);
      if (s_in) seen_full++;
    end
    taken = idx;
    expect_true(taken == 1, $sformatf("accepted %0d tokens while stopped, expected 1", taken));
    expect_true(seen_full >= 18, "input not stopped while full");
    expect_true(v_out && ocount == 0, "init token not offered");
    // 2. Random traffic.
    spct = 35; vpct = 70;
    while (ocount < NTOK / 2) @(negedge clk);
    // 3. Full rate, measured over the remaining tokens.
    spct = 0; vpct = 100;
    begin
      int unsigned c0, n0;
      repeat (4) @(negedge clk);
      c0 = ncyc; n0 = ocount;
      repeat (200) @(negedge clk);
      expect_true(ocount - n0 == 200, $sformatf("full rate: %0d tokens in 200 cycles", ocount - n0));
    end
    while (ocount < NTOK + 1) @(negedge clk);
    expect_true(operr == 0, "persistence violated on the output");
    expect_true(oretry > 0 && pretry > 0, "no retries exercised");
    // 4. Forward latency from empty.
    rst = 1'b1; vpct = 0; spct = 0; ntok = NTOK;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);                  // init token leaves
    @(negedge clk);
    expect_true(!v_out, "buffer not empty after init token left");
    vpct = 100;
    @(posedge clk); @(negedge clk);  // first cycle with v_in
    expect_true(v_in && !s_in && !v_out, "token not accepted into empty buffer");
    @(negedge clk);
    expect_true(v_out && q == seq[0], "token not offered one cycle after entering");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
