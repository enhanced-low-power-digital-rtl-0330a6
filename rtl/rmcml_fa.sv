// rmcml_fa: reversible MOS current-mode logic (MCML) full adder, logic model.
//
// The gate has four inputs A, B, C and D and four outputs P, Q, R and S, as a
// reversible gate has as many outputs as inputs. D is a constant input, held
// at 0 wherever the adder is used. P is the carry out (majority of A, B, C),
// Q the sum (A xor B xor C); R follows C and S follows D, and both are garbage
// outputs that the adders built from this cell leave unused.
//
// Only the true rail of each differential MCML signal is modelled: the
// complement rails (Ab, Bb, Cb, Db) and the tail-current bias carry no extra
// logic information. The output functions follow the design description; the
// single-rail interface is this model's choice.
//
// Purely combinational, no clock.
module rmcml_fa (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = (a & b) | (a & c) | (b & c);
    q = a ^ b ^ c;
    r = c;
    s = d;
  end

endmodule
