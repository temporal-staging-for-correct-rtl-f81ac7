// purecsa: carry-save addition of three W-bit words, combinational.
//
// Reduces three addends to two whose sum is the same modulo 2^W:
//   carry = ((a & b) | (a & c) | (b & c)) << 1   (majority, shifted)
//   sum   = a ^ b ^ c
// so carry + sum == a + b + c (mod 2^W). The pairwise ANDs are kept as
// separate terms, as in the reference formulation of the adder; the shift
// applies to the whole OR, which is what makes carry + sum correct.
// Bit 0 of carry is therefore always zero.
module purecsa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] carry,
  output logic [W-1:0] sum
);

  logic [W-1:0] anb, anc, bnc;

  always_comb begin
    anb   = a & b;
    anc   = a & c;
    bnc   = b & c;
    carry = (anb | anc | bnc) << 1;
    sum   = (a ^ b) ^ c;
  end

endmodule
