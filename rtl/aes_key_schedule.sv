// aes_key_schedule: on-the-fly AES-128 key expansion, one round key per cycle.
//
// The current round key (four words W[4i..4i+3]) sits in a 128-bit register.
// A forward step computes the next round key in a single cycle:
//   W[4i+4] = W[4i] ^ SubWord(RotWord(W[4i+3])) ^ Rcon
//   W[4i+5] = W[4i+1] ^ W[4i+4], W[4i+6] = W[4i+2] ^ W[4i+5],
//   W[4i+7] = W[4i+3] ^ W[4i+6]
// which is the chained-XOR structure of the design. Only one round key is
// stored, so no key memory is needed.
//
// Decryption consumes round keys in reverse order. For that this block also
// has a backward step (this design's addition, the document only draws the
// forward step): from round key i+1 it recovers
//   W[4i+3] = W[4i+7]^W[4i+6], W[4i+2] = W[4i+6]^W[4i+5],
//   W[4i+1] = W[4i+5]^W[4i+4], W[4i] = W[4i+4] ^ SubWord(RotWord(W[4i+3])) ^ Rcon.
// The four SubWord S-boxes are shared by both directions.
//
// Interface (all synchronous to clk, rst_n asynchronous active low):
//   load      : round_key <= key_in, rcon <= rcon_init
//   step_fwd  : round_key <= next round key, rcon <= xtime(rcon)
//   step_bwd  : round_key <= previous round key, computed with the current
//               rcon (the Rcon that produced the current key), rcon <= rcon/{02}
//   round_key : current round key (registered).
// load has priority over the steps; step_fwd over step_bwd.
// For a backward walk from round key 10, load it with rcon_init = 36h.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t key_in,
  input  byte_t  rcon_init,
  input  logic   step_fwd,
  input  logic   step_bwd,
  output block_t round_key
);

  byte_t rcon_q;
  word_t w0, w1, w2, w3;
  word_t pw3;               // W[4i+3] recovered in the backward step
  word_t sub_in, sub_out;   // SubWord(RotWord()) input and output

  assign {w0, w1, w2, w3} = round_key;
  assign pw3 = w3 ^ w2;

  // Shared SubWord(RotWord()) S-boxes: forward uses W[4i+3], backward W[4i-1].
  always_comb sub_in = step_bwd && !step_fwd ? pw3 : w3;

  for (genvar b = 0; b < 4; b++) begin : g_subword
    // RotWord: byte b of the result is byte (b+1)%4 of the input
    aes_sbox u_sbox (
      .din  (sub_in[31-8*((b+1)%4) -: 8]),
      .inv  (1'b0),
      .dout (sub_out[31-8*b -: 8])
    );
  end

  word_t nw0, nw1, nw2, nw3;
  block_t next_key, prev_key;
  always_comb begin
    nw0 = w0 ^ sub_out ^ {rcon_q, 24'h0};
    nw1 = w1 ^ nw0;
    nw2 = w2 ^ nw1;
    nw3 = w3 ^ nw2;
    next_key = {nw0, nw1, nw2, nw3};
    prev_key = {w0 ^ sub_out ^ {rcon_q, 24'h0}, w1 ^ w0, w2 ^ w1, pw3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round_key <= '0;
      rcon_q    <= RCON_FIRST;
    end else if (load) begin
      round_key <= key_in;
      rcon_q    <= rcon_init;
    end else if (step_fwd) begin
      round_key <= next_key;
      rcon_q    <= xtime(rcon_q);
    end else if (step_bwd) begin
      round_key <= prev_key;
      rcon_q    <= xtime_inv(rcon_q);
    end
  end

endmodule
