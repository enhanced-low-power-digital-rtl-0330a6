// tb_rmcml_rca: self-checking test of the ripple-carry adder.
//
// The default 4-bit adder is tested exhaustively (all a, b, cin). A 9-bit
// instance is tested with random operands. Expected values are integer sums.
module tb_rmcml_rca;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [8:0] a9, b9, s9;
  logic       ci9, co9;
  int checks = 0, failures = 0;
  bit done = 0;

  rmcml_rca dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  rmcml_rca #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .cin(ci9), .sum(s9), .cout(co9));

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, b4, a4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + ci4)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d gave %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int n = 0; n < 500; n++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); ci9 = 1'($urandom);
      #1;
      checks++;
      if ({co9, s9} !== 10'(a9 + b9 + ci9)) begin
        failures++;
        $display("FAIL 9-bit %0d+%0d+%0d gave %0d", a9, b9, ci9, {co9, s9});
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
