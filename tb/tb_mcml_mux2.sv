// tb_mcml_mux2: exhaustive self-checking test of the 2:1 multiplexer.
//
// For all a, b, s: out must be a when s = 1 and b when s = 0, out_b ~out.
module tb_mcml_mux2;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, s, out, out_b;
  int checks = 0, failures = 0;
  bit done = 0;

  mcml_mux2 dut (.a, .b, .s, .out, .out_b);

  initial begin
    #1000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expected;
      {s, b, a} = 3'(v);
      #1;
      expected = s ? a : b;
      checks++;
      if (out !== expected || out_b !== ~expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b s=%0b out=%0b out_b=%0b", a, b, s, out, out_b);
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
