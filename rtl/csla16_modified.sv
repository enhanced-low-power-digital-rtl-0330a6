// csla16_modified: 16-bit carry-select adder in five groups of growing width.
//
// The least significant group (bits 1:0) is a plain 2-bit ripple-carry adder
// driven by cin. The remaining 14 bits form four carry-select groups of 2, 3,
// 4 and 5 bits (bits 3:2, 6:4, 10:7 and 15:11). Each is a csla_block: one
// ripple-carry adder whose carry input is the enable, plus latches that keep
// its carry-in-1 result, plus muxes selected by the carry from the group
// below (c1, c3, c6, c10). Wider groups sit higher because their select
// arrives later, so their longer ripple is hidden.
//
// Timing as csla_block: operands stable through one enable cycle, result
// valid during the low phase. The grouping follows the design description;
// GROUP_WIDTHS may be changed as long as the widths add up to WIDTH.
module csla16_modified #(
  parameter csla_pkg::group_widths_t GROUP_WIDTHS = csla_pkg::GROUP_WIDTHS,
  localparam int unsigned WIDTH = csla_pkg::total_width(GROUP_WIDTHS)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = csla_pkg::NUM_GROUPS;
  localparam int unsigned W0 = GROUP_WIDTHS[0];

  // carry[g] is the carry into group g.
  logic [NG:0] carry;

  assign carry[0] = cin;

  rmcml_rca #(.WIDTH(W0)) u_group0 (
    .a    (a[W0-1:0]),
    .b    (b[W0-1:0]),
    .cin  (carry[0]),
    .sum  (sum[W0-1:0]),
    .cout (carry[1])
  );

  for (genvar g = 1; g < NG; g++) begin : g_group
    localparam int unsigned LSB = csla_pkg::group_lsb(GROUP_WIDTHS, g);
    localparam int unsigned GW  = GROUP_WIDTHS[g];

    csla_block #(.WIDTH(GW)) u_group (
      .a    (a[LSB +: GW]),
      .b    (b[LSB +: GW]),
      .en   (en),
      .cin  (carry[g]),
      .sum  (sum[LSB +: GW]),
      .cout (carry[g+1])
    );
  end

  assign cout = carry[NG];

endmodule
