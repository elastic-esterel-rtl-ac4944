// elastic_latch: level-sensitive data latch used as one half of an elastic
// register.
//
// The latch is transparent while the clock is in its active phase and the
// enable is set, and holds its value otherwise. ACTIVE_HIGH = 1 gives an
// active-high latch (transparent while clk = 1, the slave of a rising-edge
// register); ACTIVE_HIGH = 0 gives an active-low latch (transparent while
// clk = 0, the master). While rst is high the latch is forced to init,
// whatever the clock phase; reset is level sensitive and has priority.
//
// Pairing an active-low and an active-high latch with separate enables is
// what gives every elastic buffer its two storage slots without extra
// latency. The phase, enable and init behaviour follow the latch pair of the
// elastic datapath; folding both phases into one parameterised module is
// this implementation's choice.
module elastic_latch #(
  parameter int unsigned W           = 1,
  parameter bit          ACTIVE_HIGH = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] init,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic open_phase;
  assign open_phase = ACTIVE_HIGH ? clk : ~clk;

  always_latch begin
    if (rst)
      q = init;
    else if (open_phase && en)
      q = d;
  end

endmodule
