// aes_mix_column: MixColumns / InvMixColumns of one 32-bit state column.
//
// MixColumns uses the xtime form of the {02,03,01,01} circulant matrix:
//   s0' = xtime(s0^s1) ^ s1^s2^s3, s1' = xtime(s1^s2) ^ s0^s2^s3,
//   s2' = xtime(s2^s3) ^ s0^s1^s3, s3' = xtime(s0^s3) ^ s0^s1^s2.
// InvMixColumns reuses it: the inverse matrix equals the MixColumns matrix
// times the matrix {05,00,04,00} (circulant), so for inv = 1 a pre-mix step
//   s0^4(s0^s2), s1^4(s1^s3), s2^4(s0^s2), s3^4(s1^s3)
// (4x = xtime(xtime(x))) is applied first and a multiplexer feeds either the
// raw or the pre-mixed column into the shared MixColumns circuit. This
// factorisation is the design's; it saves a separate inverse circuit.
//
// Interface: din (row 0 in [31:24]), inv; dout. Combinational.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t din,
  input  logic  inv,
  output word_t dout
);

  byte_t s0, s1, s2, s3;    // column bytes
  byte_t u, v;              // pre-mix terms
  byte_t m0, m1, m2, m3;    // MixColumns inputs after the select mux

  always_comb begin
    {s0, s1, s2, s3} = din;
    u = xtime(xtime(s0 ^ s2));
    v = xtime(xtime(s1 ^ s3));
    if (inv) {m0, m1, m2, m3} = {s0 ^ u, s1 ^ v, s2 ^ u, s3 ^ v};
    else     {m0, m1, m2, m3} = {s0, s1, s2, s3};
    dout = {xtime(m0 ^ m1) ^ m1 ^ m2 ^ m3,
            xtime(m1 ^ m2) ^ m0 ^ m2 ^ m3,
            xtime(m2 ^ m3) ^ m0 ^ m1 ^ m3,
            xtime(m0 ^ m3) ^ m0 ^ m1 ^ m2};
  end

endmodule
