// aes_sbox: combined S-box and inverse S-box for one byte.
//
// Both substitutions share one 256 x 8 table of multiplicative inverses in
// GF(2^8). For SubBytes (inv = 0) the byte goes straight into the table and
// the affine transform is applied to the table output; for InvSubBytes
// (inv = 1) the inverse affine transform is applied first and the table
// output is taken directly. Two 2:1 multiplexers switch the path, so one
// memory serves both directions.
//
// Interface: din, inv in; dout out. Purely combinational (on the FPGA the
// table sits in block RAM; here it is a constant array that synthesis maps
// to a ROM).
//
// The structure (inverse table between an inverse-affine and an affine stage,
// muxes on both sides) follows the design. The table is generated at
// elaboration from a^254 rather than stored as a data file; the affine
// constants are those of the AES standard: forward
// b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i with c = 63h,
// inverse b_i = a_(i+2) ^ a_(i+5) ^ a_(i+7) ^ d_i with d = 05h.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  input  logic  inv,
  output byte_t dout
);

  typedef byte_t rom_t [256];

  function automatic rom_t build_inv_rom();
    rom_t t;
    for (int i = 0; i < 256; i++) t[i] = gf_inv(byte_t'(i));
    return t;
  endfunction

  localparam rom_t INV_ROM = build_inv_rom();

  function automatic byte_t affine(byte_t a);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = a[i] ^ a[(i+4)%8] ^ a[(i+5)%8] ^ a[(i+6)%8] ^ a[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(byte_t a);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = a[(i+2)%8] ^ a[(i+5)%8] ^ a[(i+7)%8];
    return b ^ 8'h05;
  endfunction

  byte_t rom_addr, rom_data;

  always_comb begin
    rom_addr = inv ? inv_affine(din) : din;
    rom_data = INV_ROM[rom_addr];
    dout     = inv ? rom_data : affine(rom_data);
  end

endmodule
