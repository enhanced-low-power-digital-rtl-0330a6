// csla16: 16-bit carry-select adder of four cascaded 4-bit carry-select blocks.
//
// Block k adds bits 4k+3..4k; its carry out is the carry input (mux select)
// of block k+1, and block 0 takes the adder's cin. All blocks share the
// enable, so every block precomputes its carry-in-1 result in the enable-high
// phase and in the low phase only the carry-select muxes lie on the path from
// cin to cout.
//
// Interface and timing are those of csla_block: operands held through one
// enable cycle, sum/cout valid in the low phase. The organisation follows the
// design description; BLOCK_WIDTH and NUM_BLOCKS default to its 4 x 4.
module csla16 #(
  parameter int unsigned BLOCK_WIDTH = csla_pkg::BLOCK_WIDTH,
  parameter int unsigned NUM_BLOCKS  = 4,
  localparam int unsigned WIDTH      = BLOCK_WIDTH * NUM_BLOCKS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [NUM_BLOCKS:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < NUM_BLOCKS; k++) begin : g_block
    csla_block #(.WIDTH(BLOCK_WIDTH)) u_block (
      .a    (a[k*BLOCK_WIDTH +: BLOCK_WIDTH]),
      .b    (b[k*BLOCK_WIDTH +: BLOCK_WIDTH]),
      .en   (en),
      .cin  (carry[k]),
      .sum  (sum[k*BLOCK_WIDTH +: BLOCK_WIDTH]),
      .cout (carry[k+1])
    );
  end

  assign cout = carry[NUM_BLOCKS];

endmodule
