// aes_pkg: types, constants and GF(2^8) helper functions shared by the AES
// blocks of the PCI-mFCU prototyping system.
//
// The state is a 128-bit block in the byte order of the AES standard: byte k
// of the input stream is bits [127-8k -: 8], and state cell (row r, column c)
// holds byte r+4c. A 32-bit column word has row 0 in bits [31:24].
// xtime() multiplies by {02} modulo x^8+x^4+x^3+x+1, as the MixColumns
// equations of the design use it. The multiplicative inverse is computed as
// a^254 so that the inverse ROM of the S-box can be built at elaboration time
// instead of being read from a data file.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  localparam int NB = 4;   // columns of the state
  localparam int NK = 4;   // key words (AES-128)
  localparam int NR = 10;  // rounds (AES-128)

  localparam byte_t RCON_FIRST = 8'h01;  // Rcon of round key 1
  localparam byte_t RCON_LAST  = 8'h36;  // Rcon of round key 10

  // Which AES core a wrapper holds (an FPGA is configured with one of them).
  typedef enum logic [1:0] {
    CORE_ITER_ENC = 2'd0,   // version 1, iterative loop, encryption
    CORE_ITER_DEC = 2'd1,   // version 1, iterative loop, decryption
    CORE_REG_ENC  = 2'd2,   // version 2, regular State Cell array, encryption
    CORE_REG_DEC  = 2'd3    // version 2, regular State Cell array, decryption
  } core_kind_e;

  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Inverse of xtime, used to step Rcon backwards.
  function automatic byte_t xtime_inv(byte_t b);
    return b[0] ? (((b ^ 8'h1b) >> 1) | 8'h80) : (b >> 1);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse in GF(2^8), 0 maps to 0: a^254 = a^2 * a^4 * ... * a^128.
  function automatic byte_t gf_inv(byte_t a);
    byte_t sq = a;
    byte_t r  = 8'h01;
    for (int k = 1; k < 8; k++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // Byte k (0 = first in the stream) of a block.
  function automatic byte_t get_byte(block_t b, int k);
    return b[127-8*k -: 8];
  endfunction

  // Column c of a block as a word, row 0 in bits [31:24].
  function automatic word_t get_col(block_t b, int c);
    return b[127-32*c -: 32];
  endfunction

endpackage
