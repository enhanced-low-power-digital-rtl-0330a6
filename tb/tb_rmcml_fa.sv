// tb_rmcml_fa: exhaustive self-checking test of the reversible full adder.
//
// All 16 combinations of A, B, C, D are applied. The expected carry (P) and
// sum (Q) come from the integer sum A + B + C; R must equal C and S must
// equal D.
module tb_rmcml_fa;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit done = 0;

  rmcml_fa dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #1000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {d, c, b, a} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if ({p, q} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: p,q=%0b%0b expected %0d", a, b, c, p, q, total);
      end
      checks++;
      if (r !== c || s !== d) begin
        failures++;
        $display("FAIL garbage outputs r=%0b s=%0b for c=%0b d=%0b", r, s, c, d);
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
