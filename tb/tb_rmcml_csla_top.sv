// tb_rmcml_csla_top: end-to-end test of both adders at full size.
//
// Both adders run concurrently, one addition per enable cycle each (2 ns
// high, 8 ns low: the carry-in-1 phase is the short one), with their own random operands. Checked:
//   * 32-bit adder, high phase: each 4-bit block shows its own carry-in-1
//     result (a_k + b_k + 1) mod 16 and cout shows the top block's carry;
//   * 32-bit adder, low phase: {cout32, sum32} = a32 + b32 + cin32;
//   * 32-bit adder, late carry: flipping cin32 in the low phase gives
//     a32 + b32 + ~cin32 without another enable cycle;
//   * 16-bit five-group adder, low phase: {cout16, sum16} = a16 + b16 + cin16.
// Counted, and a failure if never seen: a block selecting its latched
// (carry-in 1) result, a block selecting its direct (carry-in 0) result,
// a carry across the 16-bit slice boundary, a 32-bit overflow, a late carry
// flip, each group carry c1, c3, c6, c10 of the five-group adder being 1,
// and a 16-bit overflow.
module tb_rmcml_csla_top;
  timeunit 1ns; timeprecision 1ps;

  logic [31:0] a32, b32, sum32;
  logic        cin32, en32, cout32;
  logic [15:0] a16, b16, sum16;
  logic        cin16, en16, cout16;
  int checks = 0, failures = 0;
  bit done = 0;

  typedef enum int {
    M_SEL_LATCHED, M_SEL_DIRECT, M_SLICE_CARRY, M_OVERFLOW32, M_LATE_CARRY,
    M_C1, M_C3, M_C6, M_C10, M_OVERFLOW16, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  rmcml_csla_top dut (.*);

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic carry_into(logic [31:0] x, logic [31:0] y, logic c, int pos);
    logic [32:0] mask = (33'd1 << pos) - 1;
    logic [32:0] low  = (33'(x) & mask) + (33'(y) & mask) + 33'(c);
    return low[pos];
  endfunction

  task automatic check(string what, logic [32:0] got, logic [32:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  task automatic operation(logic [31:0] x32, logic [31:0] y32, logic c32,
                           logic [15:0] x16, logic [15:0] y16, logic c16);
    logic [31:0] pre;
    logic [4:0]  top_carry;
    a32 = x32; b32 = y32; cin32 = c32;
    a16 = x16; b16 = y16; cin16 = c16;
    en32 = 1; en16 = 1;
    #2;
    for (int k = 0; k < 8; k++) pre[4*k +: 4] = x32[4*k +: 4] + y32[4*k +: 4] + 4'd1;
    top_carry = (5'(x32[31:28]) + 5'(y32[31:28]) + 5'd1) >> 4;
    check("32-bit high phase", {cout32, sum32}, {top_carry[0], pre});
    en32 = 0; en16 = 0;
    #8;
    check("32-bit sum", {cout32, sum32}, 33'(x32) + 33'(y32) + 33'(c32));
    check("16-bit sum", 33'({cout16, sum16}), 33'(x16) + 33'(y16) + 33'(c16));
    for (int k = 0; k < 8; k++)
      if (carry_into(x32, y32, c32, 4*k)) seen[M_SEL_LATCHED]++; else seen[M_SEL_DIRECT]++;
    if (carry_into(x32, y32, c32, 16)) seen[M_SLICE_CARRY]++;
    if (cout32) seen[M_OVERFLOW32]++;
    if (carry_into(32'(x16), 32'(y16), c16, 2))  seen[M_C1]++;
    if (carry_into(32'(x16), 32'(y16), c16, 4))  seen[M_C3]++;
    if (carry_into(32'(x16), 32'(y16), c16, 7))  seen[M_C6]++;
    if (carry_into(32'(x16), 32'(y16), c16, 11)) seen[M_C10]++;
    if (cout16) seen[M_OVERFLOW16]++;
    // A late carry: only the mux selects move, the latched half is reused.
    cin32 = ~c32;
    #1;
    check("32-bit late carry", {cout32, sum32}, 33'(x32) + 33'(y32) + 33'(!c32));
    if ((33'(x32) + 33'(y32) + 33'(c32)) != (33'(x32) + 33'(y32) + 33'(!c32))) seen[M_LATE_CARRY]++;
    #1;
  endtask

  initial begin
    en32 = 0; en16 = 0;
    #1;
    operation(32'hFFFF_FFFF, 32'h0, 1'b1, 16'hFFFF, 16'h0, 1'b1);
    operation(32'h0000_FFFF, 32'h1, 1'b0, 16'h07FF, 16'h1, 1'b0);
    for (int n = 0; n < 1000; n++)
      operation($urandom, $urandom, 1'($urandom), 16'($urandom), 16'($urandom), 1'($urandom));
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %s seen %0d times", mech_e'(m), seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
