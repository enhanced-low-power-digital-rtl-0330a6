// csla32: 32-bit reversible MCML carry-select adder, the main configuration.
//
// Two 16-bit carry-select adders (each four 4-bit blocks) are cascaded: the
// lower slice's carry out drives the upper slice's carry input. The result is
// a chain of eight 4-bit carry-select blocks sharing one enable.
//
// Interface: a, b, cin, en in; sum, cout out. One addition per enable cycle:
// operands stable from the rising enable edge through the low phase, result
// valid in the low phase. Structure and width follow the design description.
module csla32 #(
  parameter int unsigned NUM_SLICES = 2,
  localparam int unsigned WIDTH     = csla_pkg::SLICE_WIDTH * NUM_SLICES
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned SW = csla_pkg::SLICE_WIDTH;

  logic [NUM_SLICES:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < NUM_SLICES; k++) begin : g_slice
    csla16 u_slice (
      .a    (a[k*SW +: SW]),
      .b    (b[k*SW +: SW]),
      .cin  (carry[k]),
      .en   (en),
      .sum  (sum[k*SW +: SW]),
      .cout (carry[k+1])
    );
  end

  assign cout = carry[NUM_SLICES];

endmodule
