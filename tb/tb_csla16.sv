// tb_csla16: self-checking test of the 16-bit adder of four 4-bit blocks.
//
// One enable cycle per addition (5 ns high, 5 ns low); in the low phase
// {cout, sum} must equal a + b + cin. Directed operands make a carry ripple
// through all four blocks (0xFFFF + 0 + 1) and overflow; random operands
// cover the rest. The test also counts that every block saw both carry-in
// values.
module tb_csla16;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a, b, sum;
  logic        cin, en, cout;
  int checks = 0, failures = 0;
  int block_cin1 [4];
  int block_cin0 [4];
  bit done = 0;

  csla16 dut (.a, .b, .cin, .en, .sum, .cout);

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic add(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] want;
    a = x; b = y; cin = c;
    en = 1; #5; en = 0; #5;
    want = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout, sum} !== want) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h, got %h", x, y, c, want, {cout, sum});
    end
    for (int k = 0; k < 4; k++) begin
      // carry into block k, from the low 4k bits alone
      logic [16:0] mask = (17'd1 << (4*k)) - 1;
      logic [16:0] low  = (17'(x) & mask) + (17'(y) & mask) + 17'(c);
      if (low[4*k]) block_cin1[k]++; else block_cin0[k]++;
    end
  endtask

  initial begin
    en = 0;
    add(16'hFFFF, 16'h0000, 1'b1);
    add(16'hFFFF, 16'hFFFF, 1'b1);
    add(16'h0000, 16'h0000, 1'b0);
    add(16'h0FFF, 16'h0001, 1'b0);
    add(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 2000; n++) add(16'($urandom), 16'($urandom), 1'($urandom));
    for (int k = 0; k < 4; k++) begin
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
