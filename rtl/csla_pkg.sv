// csla_pkg: sizes shared by the reversible MCML carry-select adder modules.
//
// The adder is organised in two ways. The main 32-bit adder is two 16-bit
// adders, each made of four 4-bit carry-select blocks. The "modified" 16-bit
// adder splits its word into five groups of 2, 2, 3, 4 and 5 bits, the lowest
// of which is a plain ripple-carry adder. All of these sizes come from the
// design description; nothing here is a free choice.
package csla_pkg;

  // Word size of the main adder.
  localparam int unsigned WORD_WIDTH  = 32;
  // Width of one carry-select block in the cascaded organisation.
  localparam int unsigned BLOCK_WIDTH = 4;
  // Width of one 16-bit slice of the main adder.
  localparam int unsigned SLICE_WIDTH = 16;

  // Group widths of the modified 16-bit adder, least significant group first:
  // bits 1:0, 3:2, 6:4, 10:7 and 15:11.
  localparam int unsigned NUM_GROUPS = 5;
  typedef int unsigned group_widths_t [NUM_GROUPS];
  localparam group_widths_t GROUP_WIDTHS = '{2, 2, 3, 4, 5};

  // Bit position of the lowest bit of group g (sum of the widths below it).
  function automatic int unsigned group_lsb(group_widths_t widths, int unsigned g);
    int unsigned pos = 0;
    for (int unsigned i = 0; i < g; i++) pos += widths[i];
    return pos;
  endfunction

  // Total width of a grouping.
  function automatic int unsigned total_width(group_widths_t widths);
    return group_lsb(widths, NUM_GROUPS);
  endfunction

endpackage
