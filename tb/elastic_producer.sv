// elastic_producer: test environment model of an elastic producer.
//
// Offers the tokens 0 .. ntok-1 of a sequence on one SELF channel. In every
// cycle in which it has no pending token it offers the next one with
// probability valid_pct %; once a token is offered it is persistent: valid
// stays high (and idx, which selects the data in the testbench, stays put)
// until the token is transferred. The channel is sampled in the middle of
// the cycle (falling edge) and driven at the rising edge. The first token may
// be offered in the first cycle after reset.
module elastic_producer (
  input  logic        clk,
  input  logic        rst,
  input  int unsigned ntok,
  input  int unsigned valid_pct,
  input  logic        stop,
  output logic        valid,
  output int unsigned idx,
  output int unsigned n_retry
);

  logic xfer_q, retry_q;

  always @(negedge clk) begin
    xfer_q  <= !rst && valid && !stop;
    retry_q <= !rst && valid && stop;
  end

  always @(posedge clk) begin
    if (rst) begin
      valid   <= (ntok > 0) && ($urandom_range(99) < valid_pct);
      idx     <= 0;
      n_retry <= 0;
    end else begin
      automatic int unsigned nidx = idx + (xfer_q ? 1 : 0);
      idx <= nidx;
      if (retry_q) begin
        valid   <= 1'b1;
        n_retry <= n_retry + 1;
      end else begin
        valid <= (nidx < ntok) && ($urandom_range(99) < valid_pct);
      end
    end
  end

endmodule
