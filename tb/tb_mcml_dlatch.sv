// tb_mcml_dlatch: self-checking test of the D-latch.
//
// A reference model tracks the last value of d seen while clk was high. The
// test toggles d at random both while clk is high (q must follow at once)
// and while it is low (q must hold); q_b must always be ~q.
module tb_mcml_dlatch;
  timeunit 1ns; timeprecision 1ps;

  logic d, clk, q, q_b;
  logic expected;
  int checks = 0, failures = 0;
  int follows = 0, holds = 0;
  bit done = 0;

  mcml_dlatch dut (.d, .clk, .q, .q_b);

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check();
    checks++;
    if (q !== expected || q_b !== ~expected) begin
      failures++;
      $display("FAIL t=%0t clk=%0b d=%0b q=%0b q_b=%0b expected %0b", $time, clk, d, q, q_b, expected);
    end
  endtask

  initial begin
    clk = 1; d = 0; expected = 0;
    #1 check();
    for (int n = 0; n < 400; n++) begin
      clk = 1'($urandom);
      #1;
      d = 1'($urandom);
      #1;
      if (clk) begin
        expected = d;
        follows++;
      end else if (d != expected) begin
        holds++;
      end
      check();
    end
    checks++;
    if (follows == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage: follows=%0d holds=%0d", follows, holds);
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
