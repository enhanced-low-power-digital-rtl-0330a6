// mcml_mux2: 2:1 multiplexer of the MCML carry-select adder.
//
// out is a when the select s is 1 and b when s is 0; out_b is its
// complement. In the carry-select block, a carries the latched carry-in-1
// result and b the direct carry-in-0 result, and s is the block's carry in.
//
// The two inputs and one select line follow the design description; which
// input s = 1 picks is read from the transistor schematic, where S drives the
// current source under the A pair. Complement inputs and bias pins are not
// modelled. Purely combinational.
module mcml_mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic out,
  output logic out_b
);

  always_comb begin
    out   = s ? a : b;
    out_b = ~out;
  end

endmodule
