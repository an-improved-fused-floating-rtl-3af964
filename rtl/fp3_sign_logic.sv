// fp3_sign_logic: effective signs of the three terms of A op1 B op2 C.
//
// Implements the document's sign equations directly:
//   seff_a = sign_a
//   seff_b = sign_a ^ (sign_b ^ op1)
//   seff_c = sign_a ^ (sign_c ^ op2)
// op = 0 adds, op = 1 subtracts. seff_b / seff_c are relative to A: a 1 means
// that term has the opposite sign to A and its significand is inverted.
// seff_a is the sign the result takes when the significand sum is positive.
// The true signs of the B and C terms (sign_x ^ op) are also given, for the
// signed-zero and special-case rules. Purely combinational.
module fp3_sign_logic (
  input  logic sign_a,
  input  logic sign_b,
  input  logic sign_c,
  input  logic op1,
  input  logic op2,
  output logic seff_a,
  output logic seff_b,
  output logic seff_c,
  output logic tsign_b,   // true sign of the B term
  output logic tsign_c    // true sign of the C term
);
  always_comb begin
    tsign_b = sign_b ^ op1;
    tsign_c = sign_c ^ op2;
    seff_a  = sign_a;
    seff_b  = sign_a ^ tsign_b;
    seff_c  = sign_a ^ tsign_c;
  end
endmodule
