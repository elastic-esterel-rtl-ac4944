// elastic_fork_eager: copies one elastic channel to N receivers, eagerly.
//
// Each receiver gets the token in the first cycle in which it is not
// stopped, independently of the others; a done bit per receiver records
// that it has already been served. The input is stopped until every
// receiver has the token, and the done bits clear when the input token is
// finally consumed. Receivers whose mask bit is 0 do not exist: they never
// see a token and never hold the input back.
// There is no combinational path from v_in to s_in, so a join followed by
// this fork forms no combinational loop. One register bit per receiver.
module elastic_fork_eager #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] mask,
  input  logic         v_in,
  output logic         s_in,
  output logic [N-1:0] v_out,
  input  logic [N-1:0] s_out
);

  logic [N-1:0] done_q;

  assign v_out = {N{v_in}} & ~done_q & mask;
  assign s_in  = |(mask & ~done_q & s_out);

  always_ff @(posedge clk) begin
    if (rst)
      done_q <= '0;
    else if (v_in && s_in)
      done_q <= done_q | (v_out & ~s_out);
    else
      done_q <= '0;
  end

endmodule
