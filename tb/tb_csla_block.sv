// tb_csla_block: self-checking test of the single-adder carry-select block.
//
// Each addition is one enable cycle: operands applied, en raised for 5 ns,
// then lowered for 5 ns. The test checks
//   * in the high phase, the outputs equal the carry-in-1 result a + b + 1;
//   * in the low phase, {cout, sum} = a + b + cin;
//   * still in the low phase, flipping cin switches the result to
//     a + b + ~cin without a new enable cycle (the late carry only moves the
//     muxes, the other result is held in the latches);
//   * exactly one enable cycle was used per addition.
// The 4-bit block is tested exhaustively, a 5-bit block at random.
module tb_csla_block;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] a4, b4, s4;
  logic       en, ci4, co4;
  logic [4:0] a5, b5, s5;
  logic       ci5, co5;
  int checks = 0, failures = 0;
  int en_cycles = 0;
  bit done = 0;

  csla_block dut4 (.a(a4), .b(b4), .en, .cin(ci4), .sum(s4), .cout(co4));
  csla_block #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .en, .cin(ci5), .sum(s5), .cout(co5));

  always @(posedge en) en_cycles++;

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_eq(string what, logic [5:0] got, logic [5:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a4=%0d b4=%0d a5=%0d b5=%0d)", what, got, want, a4, b4, a5, b5);
    end
  endtask

  task automatic add_cycle(logic [3:0] x4, logic [3:0] y4, logic c4,
                           logic [4:0] x5, logic [4:0] y5, logic c5);
    int start = en_cycles;
    a4 = x4; b4 = y4; ci4 = c4;
    a5 = x5; b5 = y5; ci5 = c5;
    en = 1;
    #5;
    expect_eq("4-bit high phase", {1'b0, co4, s4}, 6'(x4 + y4 + 1));
    expect_eq("5-bit high phase", {co5, s5}, 6'(x5 + y5 + 1));
    en = 0;
    #5;
    expect_eq("4-bit result", {1'b0, co4, s4}, 6'(x4 + y4 + c4));
    expect_eq("5-bit result", {co5, s5}, 6'(x5 + y5 + c5));
    expect_eq("enable cycles per addition", 6'(en_cycles - start), 6'd1);
    ci4 = ~c4; ci5 = ~c5;
    #1;
    expect_eq("4-bit late carry", {1'b0, co4, s4}, 6'(x4 + y4 + !c4));
    expect_eq("5-bit late carry", {co5, s5}, 6'(x5 + y5 + !c5));
    #1;
  endtask

  initial begin
    en = 0;
    #1;
    for (int v = 0; v < 512; v++) begin
      add_cycle(v[3:0], v[7:4], v[8], 5'($urandom), 5'($urandom), 1'($urandom));
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
