// tb_elastic_join: exhaustive check of the 3-input join against the SELF
// join rule: the output is valid iff every participating input is valid;
// a participating input is stopped unless all are valid and the output is
// not stopped; a non-participating input is always stopped and never
// blocks the output.
module tb_elastic_join;
  logic [2:0] mask, v_in, s_in;
  logic       v_out, s_out;
  int checks = 0, failures = 0;

  elastic_join #(.N(3)) dut (.mask(mask), .v_in(v_in), .s_in(s_in), .v_out(v_out), .s_out(s_out));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++)
      for (int v = 0; v < 8; v++)
        for (int s = 0; s < 2; s++) begin
          logic       ev;
          logic [2:0] es;
          mask = 3'(m); v_in = 3'(v); s_out = 1'(s);
          #1;
          ev = 1'b1;
          for (int i = 0; i < 3; i++) if (mask[i] && !v_in[i]) ev = 1'b0;
          for (int i = 0; i < 3; i++) es[i] = !mask[i] || !(ev && !s_out);
          checks++;
          if (v_out !== ev || s_in !== es) begin
            failures++;
            $display("mask=%b v_in=%b s_out=%b: v_out=%b s_in=%b expected %b %b",
                     mask, v_in, s_out, v_out, s_in, ev, es);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
