// tb_csla32: self-checking test of the 32-bit adder (two 16-bit slices).
//
// One enable cycle per addition (5 ns high, 5 ns low); in the low phase
// {cout, sum} must equal a + b + cin. Directed operands ripple a carry
// through all eight 4-bit blocks and across the slice boundary, and
// overflow; random operands cover the rest. The test counts that every
// block, including the upper slice's first one, saw both carry-in values.
module tb_csla32;
  timeunit 1ns; timeprecision 1ps;

  localparam int NB = 8;

  logic [31:0] a, b, sum;
  logic        cin, en, cout;
  int checks = 0, failures = 0;
  int block_cin1 [NB];
  int block_cin0 [NB];
  bit done = 0;

  csla32 dut (.a, .b, .cin, .en, .sum, .cout);

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic add(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] want;
    a = x; b = y; cin = c;
    en = 1; #5; en = 0; #5;
    want = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout, sum} !== want) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h, got %h", x, y, c, want, {cout, sum});
    end
    for (int k = 0; k < NB; k++) begin
      logic [32:0] mask = (33'd1 << (4*k)) - 1;
      logic [32:0] low  = (33'(x) & mask) + (33'(y) & mask) + 33'(c);
      if (low[4*k]) block_cin1[k]++; else block_cin0[k]++;
    end
  endtask

  initial begin
    en = 0;
    add(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    add(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    add(32'h0000_0000, 32'h0000_0000, 1'b0);
    add(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    add(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int n = 0; n < 2000; n++) add($urandom, $urandom, 1'($urandom));
    for (int k = 0; k < NB; k++) begin
      checks++;
      if (block_cin1[k] == 0 || block_cin0[k] == 0) begin
        failures++;
        $display("FAIL coverage: block %0d cin1=%0d cin0=%0d", k, block_cin1[k], block_cin0[k]);
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
