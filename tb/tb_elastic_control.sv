// tb_elastic_control: checks the generated control layer on a small
// netlist built in the testbench: one input x, an accumulator register
// ACC' = ACC + x, a delay register DX' = x, and an output o = ACC + DX.
// Both registers are double_latch pairs driven by the control's enables;
// the input fans out to two registers, ACC reads itself, and the output is
// a combinational interface join over two registers. The output token
// stream must equal the synchronous sequence o(t) = ACC(t) + DX(t) under
// random bubbles and stops, and with no bubbles and stops one token per
// cycle must come out.
module tb_elastic_control;
  localparam int unsigned NTOK = 3000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  xs [NTOK], exp_o [NTOK];
  int unsigned ntok = NTOK, vpct = 60, spct = 40;
  logic        in_valid, in_stop, out_valid, out_stop;
  logic [1:0]  en1, en2;
  int unsigned idx, pretry, ocount, oretry, operr;
  logic [7:0]  x, acc_q, dx_q, o;

  assign x = xs[idx % NTOK];
  assign o = acc_q + dx_q;

  elastic_control #(
    .N_IN(1), .N_REG(2), .N_OUT(1),
    .REG_DEP({3'b001, 3'b011}), .OUT_DEP(3'b110), .REG_INIT(2'b11)
  ) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_stop(in_stop),
    .out_valid(out_valid), .out_stop(out_stop), .en1(en1), .en2(en2));

  double_latch #(.W(8)) u_acc (.clk(clk), .rst(rst), .en1(en1[0]), .en2(en2[0]), .init(8'd0),
    .d(acc_q + x), .q(acc_q));
  double_latch #(.W(8)) u_dx (.clk(clk), .rst(rst), .en1(en1[1]), .en2(en2[1]), .init(8'd0),
    .d(x), .q(dx_q));

  elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct), .stop(in_stop),
    .valid(in_valid), .idx(idx), .n_retry(pretry));
  elastic_consumer #(.W(8)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(out_valid),
    .data(o), .stop(out_stop), .count(ocount), .n_retry(oretry), .persist_err(operr));

  always @(negedge clk) begin
    if (!rst && out_valid && !out_stop && ocount < NTOK) begin
      checks++;
      if (o !== exp_o[ocount]) begin
        failures++;
        if (failures < 10) $display("token %0d: o=%0d expected %0d", ocount, o, exp_o[ocount]);
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
    logic [7:0] acc, dx;
    for (int t = 0; t < NTOK; t++) xs[t] = 8'($urandom);
    acc = 0; dx = 0;
    for (int t = 0; t < NTOK; t++) begin
      exp_o[t] = acc + dx;
      acc = acc + xs[t];
      dx  = xs[t];
    end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    while (ocount < NTOK - 300) @(negedge clk);
    vpct = 100; spct = 0;
    repeat (5) @(negedge clk);
    begin
      int unsigned n0;
      n0 = ocount;
      repeat (200) @(negedge clk);
      checks++;
      if (ocount - n0 != 200) begin
        failures++;
        $display("full rate: %0d tokens in 200 cycles", ocount - n0);
      end
    end
    while (ocount < NTOK) @(negedge clk);
    checks++;
    if (operr != 0 || oretry == 0 || pretry == 0) begin
      failures++;
      $display("persistence errors %0d, output retries %0d, input retries %0d", operr, oretry, pretry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
