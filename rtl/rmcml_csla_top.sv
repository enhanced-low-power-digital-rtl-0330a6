// rmcml_csla_top: the reversible MCML carry-select adders, side by side.
//
// The design has two organisations of the same idea (one ripple-carry adder
// per block, time-shared between carry-in 1 and carry-in 0 with a latch to
// keep the first result):
//   * the main 32-bit adder, csla32: two 16-bit adders of four 4-bit blocks;
//   * the 16-bit modified adder, csla16_modified: a 2-bit ripple-carry adder
//     followed by carry-select groups of 2, 3, 4 and 5 bits.
// Each has its own operands, carry in, enable and results, so either can be
// used or tested alone.
//
// Timing for both: present the operands and raise the enable, then lower it;
// the sum and carry out are valid during the low phase. One addition per
// enable cycle.
module rmcml_csla_top
  import csla_pkg::*;
(
  input  logic [WORD_WIDTH-1:0] a32,
  input  logic [WORD_WIDTH-1:0] b32,
  input  logic        cin32,
  input  logic        en32,
  output logic [WORD_WIDTH-1:0] sum32,
  output logic        cout32,
  input  logic [SLICE_WIDTH-1:0] a16,
  input  logic [SLICE_WIDTH-1:0] b16,
  input  logic        cin16,
  input  logic        en16,
  output logic [SLICE_WIDTH-1:0] sum16,
  output logic        cout16
);

  csla32 u_csla32 (
    .a    (a32),
    .b    (b32),
    .cin  (cin32),
    .en   (en32),
    .sum  (sum32),
    .cout (cout32)
  );

  csla16_modified u_csla16_modified (
    .a    (a16),
    .b    (b16),
    .cin  (cin16),
    .en   (en16),
    .sum  (sum16),
    .cout (cout16)
  );

endmodule
