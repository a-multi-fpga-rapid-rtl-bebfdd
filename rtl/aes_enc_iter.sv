// aes_enc_iter: AES-128 encryption core, iterative loop architecture
// (version 1 of the two cores of the system).
//
// One round of hardware (16 S-boxes, ShiftRows wiring, four MixColumns
// columns, AddRoundKey) is reused ten times. A single 128-bit state register
// is fed by a multiplexer that selects either the plaintext after the initial
// AddRoundKey or the output of the previous round. The round key for each
// round is produced on the fly by aes_key_schedule, one key per cycle.
//
// Interface: start (one cycle, idle only) samples din and key. dout holds the
// ciphertext and done pulses for one cycle when it is ready; busy is high in
// between. Timing, counted in rising clock edges from the edge that samples
// start (edge 1):
//   edge 1      din and key captured (input register, key register loaded)
//   edge 2      state <= din ^ round key 0
//   edges 3..11 rounds 1..9 (SubBytes, ShiftRows, MixColumns, AddRoundKey)
//   edge 12     round 10 without MixColumns into dout, done = 1
// so a block takes 12 cycles, the cycle count given for this architecture.
// The loop structure follows the design; the input register, the
// start/done/busy handshake and the cycle split are this design's choices.
module aes_enc_iter
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t din,
  input  block_t key,
  output block_t dout,
  output logic   done,
  output logic   busy
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_ROUND} phase_e;

  phase_e      phase;
  logic [3:0]  round;
  block_t      din_q, state_q;
  block_t      rk;
  block_t      sb, sr, mc, round_out, last_out;

  aes_key_schedule u_keys (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (start && phase == S_IDLE),
    .key_in    (key),
    .rcon_init (RCON_FIRST),
    .step_fwd  (phase != S_IDLE),
    .step_bwd  (1'b0),
    .round_key (rk)
  );

  // SubBytes: 16 parallel S-boxes
  for (genvar k = 0; k < 16; k++) begin : g_sub
    aes_sbox u_sbox (.din(state_q[127-8*k -: 8]), .inv(1'b0), .dout(sb[127-8*k -: 8]));
  end

  aes_shift_rows u_sr (.din(sb), .inv(1'b0), .dout(sr));

  for (genvar c = 0; c < 4; c++) begin : g_mix
    aes_mix_column u_mc (.din(sr[127-32*c -: 32]), .inv(1'b0), .dout(mc[127-32*c -: 32]));
  end

  aes_add_round_key u_ark_round (.state(mc), .round_key(rk), .dout(round_out));
  aes_add_round_key u_ark_last  (.state(sr), .round_key(rk), .dout(last_out));

  block_t init_out;
  aes_add_round_key u_ark_init (.state(din_q), .round_key(rk), .dout(init_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= S_IDLE;
      round   <= '0;
      din_q   <= '0;
      state_q <= '0;
      dout    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        S_IDLE: if (start) begin
          din_q <= din;
          phase <= S_INIT;
        end
        S_INIT: begin
          state_q <= init_out;           // mux selects the input path
          round   <= 4'd1;
          phase   <= S_ROUND;
        end
        S_ROUND: begin
          if (round == 4'(NR)) begin
            dout  <= last_out;
            done  <= 1'b1;
            phase <= S_IDLE;
          end else begin
            state_q <= round_out;        // mux selects the loop path
            round   <= round + 4'd1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  assign busy = (phase != S_IDLE);

endmodule
