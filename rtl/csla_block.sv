// csla_block: carry-select block with a single ripple-carry adder and D-latches.
//
// A conventional carry-select adder computes each block twice, with two
// ripple-carry adders whose carry inputs are 0 and 1, and picks one result
// when the real carry arrives. This block replaces the carry-in-1 adder by a
// row of D-latches and time-shares one adder:
//
//   en high : the adder's carry input is en = 1, so it computes a + b + 1;
//             the latches are transparent and capture that sum and carry.
//   en low  : the adder now computes a + b + 0; the latches hold the
//             carry-in-1 result. For every bit, and for the carry out, a
//             2:1 mux passes the latched value when cin = 1 and the direct
//             adder value when cin = 0.
//
// One addition thus takes one enable cycle: a and b must be stable through
// the high phase and the following low phase, and sum/cout are valid during
// the low phase once cin has settled. While en is high the outputs show the
// carry-in-1 result.
//
// The block has WIDTH + 1 latches, one per sum bit and one for the carry
// out. The published transistor count of a 4-bit block implies four latches
// (sum bits only), while the five-group block diagram shows one latch more
// than each group's width. This design keeps the extra carry latch, because
// without it the carry mux has no carry-in-1 carry to choose. The rest
// (enable as the adder's carry input, latches, muxes selected by cin)
// follows the design description.
module csla_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             en,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // Adder result, {carry, sum}: carry-in 1 while en is high, 0 while low.
  logic [WIDTH:0] direct;
  // Latched carry-in-1 result. The complement outputs of the latches and
  // muxes are not needed here and are left open.
  logic [WIDTH:0] held;
  logic [WIDTH:0] selected;

  rmcml_rca #(.WIDTH(WIDTH)) u_rca (
    .a    (a),
    .b    (b),
    .cin  (en),
    .sum  (direct[WIDTH-1:0]),
    .cout (direct[WIDTH])
  );

  for (genvar i = 0; i <= WIDTH; i++) begin : g_sel
    mcml_dlatch u_latch (
      .d   (direct[i]),
      .clk (en),
      .q   (held[i]),
      .q_b ()
    );

    mcml_mux2 u_mux (
      .a     (held[i]),
      .b     (direct[i]),
      .s     (cin),
      .out   (selected[i]),
      .out_b ()
    );
  end

  assign sum  = selected[WIDTH-1:0];
  assign cout = selected[WIDTH];

endmodule
