// tb_elastic_fork_lazy: exhaustive check of the 3-output lazy fork: the
// input is stopped when any receiver is stopped, and a receiver sees a
// token only when the input is valid and no other receiver is stopped, so
// all receivers take the token in the same cycle.
module tb_elastic_fork_lazy;
  logic       v_in, s_in;
  logic [2:0] v_out, s_out;
  int checks = 0, failures = 0;

  elastic_fork_lazy #(.N(3)) dut (.v_in(v_in), .s_in(s_in), .v_out(v_out), .s_out(s_out));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int s = 0; s < 8; s++) begin
        logic [2:0] ev;
        logic       es;
        v_in = 1'(v); s_out = 3'(s);
        #1;
        es = |s_out;
        for (int k = 0; k < 3; k++) begin
          logic other;
          other = 1'b0;
          for (int j = 0; j < 3; j++) if (j != k && s_out[j]) other = 1'b1;
          ev[k] = v_in && !other;
        end
        checks++;
        if (s_in !== es || v_out !== ev) begin
          failures++;
          $display("v_in=%b s_out=%b: s_in=%b v_out=%b expected %b %b", v_in, s_out, s_in, v_out, es, ev);
        end
        // All-or-nothing: an input transfer happens iff every receiver transfers.
        checks++;
        if ((v_in && !s_in) !== (&(v_out & ~s_out))) begin
          failures++;
          $display("v_in=%b s_out=%b: receivers not served together", v_in, s_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
