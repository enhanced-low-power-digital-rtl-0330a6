// tb_csla16_modified: self-checking test of the five-group 16-bit adder.
//
// Groups are bits 1:0 (plain ripple-carry adder), 3:2, 6:4, 10:7 and 15:11.
// One enable cycle per addition; in the low phase {cout, sum} must equal
// a + b + cin. In the high phase the lowest group already shows its real
// result, because it takes cin directly and has no latch. The test counts
// that each group carry c1, c3, c6, c10 took both values.
module tb_csla16_modified;
  timeunit 1ns; timeprecision 1ps;

  localparam int GROUP_LSB [5] = '{0, 2, 4, 7, 11};

  logic [15:0] a, b, sum;
  logic        cin, en, cout;
  int checks = 0, failures = 0;
  int carry1 [1:4];
  int carry0 [1:4];
  bit done = 0;

  csla16_modified dut (.a, .b, .cin, .en, .sum, .cout);

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
    en = 1; #5;
    checks++;
    if (sum[1:0] !== 2'(x[1:0] + y[1:0] + c)) begin
      failures++;
      $display("FAIL group 1:0 in high phase: %0d", sum[1:0]);
    end
    en = 0; #5;
    want = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout, sum} !== want) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h, got %h", x, y, c, want, {cout, sum});
    end
    for (int g = 1; g < 5; g++) begin
      logic [16:0] mask = (17'd1 << GROUP_LSB[g]) - 1;
      logic [16:0] low  = (17'(x) & mask) + (17'(y) & mask) + 17'(c);
      if (low[GROUP_LSB[g]]) carry1[g]++; else carry0[g]++;
    end
  endtask

  initial begin
    en = 0;
    add(16'hFFFF, 16'h0000, 1'b1);
    add(16'hFFFF, 16'hFFFF, 1'b1);
    add(16'h0000, 16'h0000, 1'b0);
    add(16'h07FF, 16'h0001, 1'b0);
    add(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 2000; n++) add(16'($urandom), 16'($urandom), 1'($urandom));
    for (int g = 1; g < 5; g++) begin
      checks++;
      if (carry1[g] == 0 || carry0[g] == 0) begin
        failures++;
        $display("FAIL coverage: group %0d carry in 1:%0d 0:%0d", g, carry1[g], carry0[g]);
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
