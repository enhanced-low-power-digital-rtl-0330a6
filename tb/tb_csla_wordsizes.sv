// tb_csla_wordsizes: the 8-, 16- and 32-bit word sizes of the cascaded adder.
//
// The cascaded carry-select adder is evaluated at three word sizes: 8 bits
// (two 4-bit blocks), 16 bits (four) and 32 bits (two 16-bit slices). All
// three are instantiated here and given the same random operands, truncated
// to their width, one addition per enable cycle. Each low-phase result must
// equal the integer sum. The test also checks that all three finish within
// the same single enable cycle.
module tb_csla_wordsizes;
  timeunit 1ns; timeprecision 1ps;

  logic [31:0] a, b, sum32;
  logic [15:0] sum16;
  logic [7:0]  sum8;
  logic        cin, en, cout8, cout16, cout32;
  int checks = 0, failures = 0;
  int en_cycles = 0;
  bit done = 0;

  csla16 #(.NUM_BLOCKS(2)) dut8 (.a(a[7:0]), .b(b[7:0]), .cin, .en, .sum(sum8), .cout(cout8));
  csla16 dut16 (.a(a[15:0]), .b(b[15:0]), .cin, .en, .sum(sum16), .cout(cout16));
  csla32 dut32 (.a, .b, .cin, .en, .sum(sum32), .cout(cout32));

  always @(posedge en) en_cycles++;

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(string what, logic [32:0] got, logic [32:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    en = 0;
    #1;
    for (int n = 0; n < 3000; n++) begin
      int start;
      start = en_cycles;
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n == 0) begin a = '1; b = '0; cin = 1; end
      en = 1; #5; en = 0; #5;
      check("8-bit",  33'({cout8, sum8}),   33'(a[7:0])  + 33'(b[7:0])  + 33'(cin));
      check("16-bit", 33'({cout16, sum16}), 33'(a[15:0]) + 33'(b[15:0]) + 33'(cin));
      check("32-bit", {cout32, sum32},      33'(a)       + 33'(b)       + 33'(cin));
      check("enable cycles", 33'(en_cycles - start), 33'd1);
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
