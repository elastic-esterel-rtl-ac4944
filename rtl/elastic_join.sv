// elastic_join: merges N elastic channels into one.
//
// The output carries a token only when every participating input carries
// one (v_out = AND of the valids); the inputs are then all consumed in the
// same cycle if the output is not stopped. An input that holds a token while
// another participating input is idle, or while the output is stopped, gets
// stop = 1 and must keep its token (persistence). Inputs whose mask bit is 0
// take no part: they never block the output and are always stopped. With an
// all-zero mask the output is permanently valid.
// Purely combinational; the one combinational path from valid to stop is the
// usual one for a join and is cut by the elastic buffer behind it.
module elastic_join #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] mask,
  input  logic [N-1:0] v_in,
  output logic [N-1:0] s_in,
  output logic         v_out,
  input  logic         s_out
);

  assign v_out = &(v_in | ~mask);
  assign s_in  = {N{s_out || !v_out}} | ~mask;

endmodule
