// tb_double_latch: checks the master/slave latch register.
// With both enables high it must behave as a rising-edge register (q in
// cycle t+1 equals d in cycle t). With en2 low the slave keeps its token
// while the master takes the next one (two tokens stored), and raising en2
// again moves the master's token to the output one cycle later. With en1
// low the master ignores d. Reset loads init.
// Inputs are driven at the rising edge and q is sampled at the falling edge.
module tb_double_latch;
  logic       clk = 1'b0, rst = 1'b1, en1 = 1'b0, en2 = 1'b1;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  double_latch #(.W(8)) dut (.clk(clk), .rst(rst), .en1(en1), .en2(en2), .init(8'hA5), .d(d), .q(q));

  // One clock cycle: en2 is set in the low phase before the cycle (the slave
  // latch is closed then), en1 and d at the rising edge (the master latch is
  // closed in the high phase); q is checked at the falling edge.
  task automatic cyc(input logic e2, input logic e1, input logic [7:0] dv,
                     input logic [7:0] exp, input string what);
    en2 = e2;
    @(posedge clk); en1 <= e1; d <= dv;
    @(negedge clk);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("%s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    @(negedge clk);
    checks++;
    if (q !== 8'hA5) begin failures++; $display("reset value %h", q); end
    rst = 1'b0;
    cyc(1, 1, 8'h01, 8'hA5, "first cycle after reset shows init");
    prev = 8'h01;
    for (int i = 0; i < 50; i++) begin
      logic [7:0] nd;
      nd = 8'($urandom);
      cyc(1, 1, nd, prev, "register behaviour");
      prev = nd;
    end
    cyc(1, 1, 8'hB1, prev,  "last random token");
    cyc(1, 0, 8'hC2, 8'hB1, "B1 at output, master ignores C2");
    cyc(0, 0, 8'hD3, 8'hB1, "slave holds with en2=0");
    cyc(1, 1, 8'hE5, 8'hB1, "master kept B1 with en1=0");
    cyc(1, 1, 8'hF6, 8'hE5, "E5 at output, F6 into master");
    cyc(0, 0, 8'h00, 8'hE5, "two tokens: E5 held in slave");
    cyc(0, 0, 8'h00, 8'hE5, "two tokens: still E5");
    cyc(1, 0, 8'h00, 8'hF6, "F6 released from master");
    rst = 1'b1;
    #1;
    checks++;
    if (q !== 8'hA5) begin failures++; $display("reset during operation %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
