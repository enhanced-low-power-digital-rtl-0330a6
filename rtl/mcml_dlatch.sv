// mcml_dlatch: 1-bit level-sensitive D-latch of the MCML carry-select adder.
//
// While clk (the adder's enable) is high the latch is transparent and q
// follows d; when clk goes low, q keeps the last value of d. q_b is the
// complement of q, as the differential MCML latch provides both rails.
//
// The behaviour follows the design description. The complement data input
// and the bias pins of the transistor-level latch are not modelled, and the
// latch has no reset: it is loaded by the first enable-high phase.
module mcml_dlatch (
  input  logic d,
  input  logic clk,
  output logic q,
  output logic q_b
);

  logic state;

  always_latch begin
    if (clk) state = d;
  end

  assign q   = state;
  assign q_b = ~state;

endmodule
