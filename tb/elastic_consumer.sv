// elastic_consumer: test environment model of an elastic consumer.
//
// Drives the stop wire of one SELF channel: in every cycle stop is raised
// with probability stop_pct % (also during reset, so the first
// cycle after reset is already under control of stop_pct). It counts transfers (valid & !stop, sampled
// at the falling edge) and checks SELF persistence: after a retry cycle the
// channel must still be valid and carry the same data. Data is compared
// against the expected sequence by the testbench.
module elastic_consumer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  int unsigned  stop_pct,
  input  logic         valid,
  input  logic [W-1:0] data,
  output logic         stop,
  output int unsigned  count,
  output int unsigned  n_retry,
  output int unsigned  persist_err
);

  logic         was_retry;
  logic [W-1:0] last_data;

  always @(posedge clk) begin
    stop <= ($urandom_range(99) < stop_pct);
  end

  always @(negedge clk) begin
    if (rst) begin
      count       <= 0;
      n_retry     <= 0;
      persist_err <= 0;
      was_retry   <= 1'b0;
    end else begin
      if (was_retry && (!valid || data != last_data))
        persist_err <= persist_err + 1;
      was_retry <= valid && stop;
      last_data <= data;
      if (valid && stop)  n_retry <= n_retry + 1;
      if (valid && !stop) count   <= count + 1;
    end
  end

endmodule
