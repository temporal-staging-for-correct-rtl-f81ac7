// blake2b_g: the BLAKE2b mixing function G, combinational.
//
// G mixes four work-vector words (a, b, c, d) with two message words
// (x, y) in eight steps of modular addition, xor and right rotation:
//   a := a + b + x;  d := (d ^ a) >>> R1;  c := c + d;  b := (b ^ c) >>> R2;
//   a := a + b + y;  d := (d ^ a) >>> R3;  c := c + d;  b := (b ^ c) >>> R4;
// Additions are modulo 2^W. The step sequence is the one of the BLAKE2b
// specification; the rotation amounts 32, 24, 16, 63 are the BLAKE2b
// values of that specification. No clock: the result is valid in the same
// cycle as the inputs.
module blake2b_g #(
  parameter int unsigned W  = 64,
  parameter int unsigned R1 = 32,
  parameter int unsigned R2 = 24,
  parameter int unsigned R3 = 16,
  parameter int unsigned R4 = 63
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] a_o,
  output logic [W-1:0] b_o,
  output logic [W-1:0] c_o,
  output logic [W-1:0] d_o
);

  function automatic logic [W-1:0] rotr(input logic [W-1:0] v, input int unsigned n);
    return (v >> n) | (v << (W - n));
  endfunction

  logic [W-1:0] a1, b1, c1, d1;

  always_comb begin
    a1  = a_i + b_i + x;
    d1  = rotr(d_i ^ a1, R1);
    c1  = c_i + d1;
    b1  = rotr(b_i ^ c1, R2);
    a_o = a1 + b1 + y;
    d_o = rotr(d1 ^ a_o, R3);
    c_o = c1 + d_o;
    b_o = rotr(b1 ^ c_o, R4);
  end

endmodule
