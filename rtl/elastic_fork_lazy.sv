// elastic_fork_lazy: copies one elastic channel to N receivers, lazily.
//
// A receiver is offered the token only in a cycle in which no other
// receiver is stopped, so all receivers take the token in the same cycle and
// no state is needed. The input is stopped while any receiver is stopped.
// Because v_out depends combinationally on s_out, placing a lazy fork
// directly behind a join, with no elastic buffer between them, closes a
// combinational loop; the eager fork is used for that case.
module elastic_fork_lazy #(
  parameter int unsigned N = 2
) (
  input  logic         v_in,
  output logic         s_in,
  output logic [N-1:0] v_out,
  input  logic [N-1:0] s_out
);

  assign s_in = |s_out;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic others_stopped;
      others_stopped = 1'b0;
      for (int j = 0; j < N; j++)
        if (j != k) others_stopped |= s_out[j];
      v_out[k] = v_in && !others_stopped;
    end
  end

endmodule
