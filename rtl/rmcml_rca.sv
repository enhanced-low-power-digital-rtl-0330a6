// rmcml_rca: ripple-carry adder built from the reversible MCML full adder.
//
// WIDTH full adders are chained, the carry out (P) of bit i feeding the carry
// input (C) of bit i+1. Each adder's constant input D is tied to 0 and its
// garbage outputs R and S are left open.
//
// Interface: a, b and cin in, sum and cout out. Purely combinational; the
// delay grows with WIDTH as the carry ripples from bit 0 upward.
module rmcml_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] unused_r, unused_s;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rmcml_fa u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (carry[i]),
      .d (1'b0),
      .p (carry[i+1]),
      .q (sum[i]),
      .r (unused_r[i]),
      .s (unused_s[i])
    );
  end

  assign cout = carry[WIDTH];

endmodule
