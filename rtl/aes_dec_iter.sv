// aes_dec_iter: AES-128 decryption core, iterative loop architecture
// (version 1).
//
// The loop register holds the state; one pass of the round hardware applies
// InvShiftRows, InvSubBytes, AddRoundKey and then InvMixColumns, the order
// drawn for the decryption loop. The last pass skips InvMixColumns and goes
// to the output. InvMixColumns uses the pre-mix + MixColumns circuit.
//
// Round keys are needed from 10 down to 0. They are produced on the fly by
// walking the key schedule backwards from round key 10, which is computed
// once per key (key setup) and kept in a register:
//   key_setup (one cycle, idle only): samples key, runs the forward schedule
//   for 10 cycles and stores round key 10; key_ready goes high 12 cycles later.
// Blocks then take 12 cycles each, counted in rising edges from the edge
// that samples start (edge 1):
//   edge 1      din captured, schedule loaded with round key 10
//   edge 2      state <= din ^ round key 10
//   edges 3..11 rounds with round keys 9..1 (with InvMixColumns)
//   edge 12     last round with round key 0 into dout, done = 1
// Starting before key_ready gives a wrong result. The key setup phase, the
// backward key walk and the handshake are this design's choices; the document
// gives only the round structure and the 12-cycle count.
module aes_dec_iter
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_setup,
  input  block_t key,
  output logic   key_ready,
  input  logic   start,
  input  block_t din,
  output block_t dout,
  output logic   done,
  output logic   busy
);

  typedef enum logic [1:0] {S_IDLE, S_KEYEXP, S_INIT, S_ROUND} phase_e;

  phase_e      phase;
  logic [3:0]  round;
  block_t      din_q, state_q, last_key_q;
  block_t      rk;
  block_t      isr, isb, ark, imc, init_out;

  wire idle = (phase == S_IDLE);

  aes_key_schedule u_keys (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (idle && (key_setup || start)),
    .key_in    (key_setup ? key : last_key_q),
    .rcon_init (key_setup ? RCON_FIRST : RCON_LAST),
    .step_fwd  (phase == S_KEYEXP),
    .step_bwd  (phase == S_INIT || phase == S_ROUND),
    .round_key (rk)
  );

  aes_shift_rows u_isr (.din(state_q), .inv(1'b1), .dout(isr));

  for (genvar k = 0; k < 16; k++) begin : g_sub
    aes_sbox u_sbox (.din(isr[127-8*k -: 8]), .inv(1'b1), .dout(isb[127-8*k -: 8]));
  end

  aes_add_round_key u_ark      (.state(isb),   .round_key(rk), .dout(ark));
  aes_add_round_key u_ark_init (.state(din_q), .round_key(rk), .dout(init_out));

  for (genvar c = 0; c < 4; c++) begin : g_mix
    aes_mix_column u_imc (.din(ark[127-32*c -: 32]), .inv(1'b1), .dout(imc[127-32*c -: 32]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= S_IDLE;
      round      <= '0;
      din_q      <= '0;
      state_q    <= '0;
      last_key_q <= '0;
      key_ready  <= 1'b0;
      dout       <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        S_IDLE: begin
          if (key_setup) begin
            key_ready <= 1'b0;
            round     <= 4'd0;
            phase     <= S_KEYEXP;
          end else if (start) begin
            din_q <= din;
            phase <= S_INIT;
          end
        end
        S_KEYEXP: begin
          // round counts the forward steps taken; rk reaches key 10 after 10
          if (round == 4'(NR)) begin
            last_key_q <= rk;
            key_ready  <= 1'b1;
            phase      <= S_IDLE;
          end else begin
            round <= round + 4'd1;
          end
        end
        S_INIT: begin
          state_q <= init_out;
          round   <= 4'd1;
          phase   <= S_ROUND;
        end
        S_ROUND: begin
          if (round == 4'(NR)) begin
            dout  <= ark;
            done  <= 1'b1;
            phase <= S_IDLE;
          end else begin
            state_q <= imc;
            round   <= round + 4'd1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  assign busy = !idle;

endmodule
