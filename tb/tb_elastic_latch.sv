// tb_elastic_latch: checks both phases of elastic_latch.
// The clock is driven by hand. For each phase the test checks: reset loads
// init in either clock phase; the latch follows d while its phase is active
// and en = 1; it holds while en = 0 or while the clock is in the other phase.
module tb_elastic_latch;
  logic       clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [7:0] d = 8'h00, init = 8'h5a;
  logic [7:0] qh, ql;
  int checks = 0, failures = 0;

  elastic_latch #(.W(8), .ACTIVE_HIGH(1'b1)) u_h (.clk(clk), .rst(rst), .en(en), .init(init), .d(d), .q(qh));
  elastic_latch #(.W(8), .ACTIVE_HIGH(1'b0)) u_l (.clk(clk), .rst(rst), .en(en), .init(init), .d(d), .q(ql));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 check(qh, 8'h5a, "reset high latch (clk=0)");
    check(ql, 8'h5a, "reset low latch (clk=0)");
    clk = 1'b1; d = 8'h11; #1;
    check(qh, 8'h5a, "reset high latch (clk=1)");
    check(ql, 8'h5a, "reset low latch (clk=1)");
    rst = 1'b0; en = 1'b1; #1;
    check(qh, 8'h11, "high latch transparent");
    check(ql, 8'h5a, "low latch closed in high phase");
    d = 8'h22; #1;
    check(qh, 8'h22, "high latch follows d");
    clk = 1'b0; #1;
    d = 8'h33; #1;
    check(qh, 8'h22, "high latch holds in low phase");
    check(ql, 8'h33, "low latch transparent");
    en = 1'b0; d = 8'h44; #1;
    check(ql, 8'h33, "low latch holds with en=0");
    clk = 1'b1; #1;
    check(qh, 8'h22, "high latch holds with en=0");
    en = 1'b1; #1;
    check(qh, 8'h44, "high latch opens with en");
    check(ql, 8'h33, "low latch holds in high phase");
    rst = 1'b1; #1;
    check(qh, 8'h5a, "reset during operation (high)");
    check(ql, 8'h5a, "reset during operation (low)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
