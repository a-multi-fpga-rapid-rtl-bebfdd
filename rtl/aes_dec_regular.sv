// aes_dec_regular: AES-128 decryption unit in the regular, scalable
// architecture (version 2).
//
// A 4 x 4 array of decryption State Cells (aes_state_cell_dec) with one
// InvMixColumns unit per column. In a normal round every cell's inverse
// S-box output goes through the InvShiftRows wiring, is XORed with the round
// key inside the destination cell, passes through the column's InvMixColumns
// unit (pre-mix + MixColumns) and is loaded back; the initial and the last
// round load the XOR result directly.
//
// Round keys are used from 10 down to 0 and are made on the fly by walking
// the key schedule backwards from round key 10. Round key 10 is computed once
// per key: key_setup (idle only) samples key and key_ready rises 12 cycles
// later. Block handshake and timing are those of aes_enc_regular: start with
// column 0 on din, columns 1..3 on the next cycles, initial AddRoundKey at
// edge 4, nine normal rounds at edges 5..13, last round at edge 14, result
// columns 0..3 on dout after edges 14..17 with dout_valid high: 17 cycles.
// The key setup phase and the backward key walk are this design's choices.
module aes_dec_regular
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_setup,
  input  block_t key,
  output logic   key_ready,
  input  logic   start,
  input  word_t  din,
  output word_t  dout,
  output logic   dout_valid,
  output logic   busy
);

  logic [4:0] cyc;      // block cycle counter, 0 idle, 1..17
  logic [3:0] kcnt;     // key setup counter
  logic       kbusy;    // key setup running
  logic       accept, en, ark_sel, step;
  logic [1:0] reg_sel;
  block_t     rk, last_key_q, q, sb, sr, ark, imc;

  wire block_idle = (cyc == 5'd0 || cyc == 5'd17);
  assign accept = start && block_idle && !kbusy && !key_setup;
  wire  kload  = key_setup && block_idle && !kbusy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cyc <= '0;
    else if (accept)       cyc <= 5'd1;
    else if (cyc == 5'd17) cyc <= '0;
    else if (cyc != 5'd0)  cyc <= cyc + 5'd1;
  end

  // Key setup: forward schedule for 10 steps, keep round key 10
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kbusy      <= 1'b0;
      kcnt       <= '0;
      key_ready  <= 1'b0;
      last_key_q <= '0;
    end else if (kload) begin
      kbusy     <= 1'b1;
      kcnt      <= '0;
      key_ready <= 1'b0;
    end else if (kbusy) begin
      if (kcnt == 4'(NR)) begin
        last_key_q <= rk;
        key_ready  <= 1'b1;
        kbusy      <= 1'b0;
      end else begin
        kcnt <= kcnt + 4'd1;
      end
    end
  end

  always_comb begin
    en      = accept || (cyc != 5'd0 && cyc != 5'd17);
    reg_sel = 2'd0;
    ark_sel = 1'b0;
    step    = 1'b0;
    if (cyc == 5'd3) begin                            // initial AddRoundKey
      reg_sel = 2'd2; ark_sel = 1'b0; step = 1'b1;
    end else if (cyc >= 5'd4 && cyc <= 5'd12) begin   // normal rounds
      reg_sel = 2'd1; ark_sel = 1'b1; step = 1'b1;
    end else if (cyc == 5'd13) begin                  // last round
      reg_sel = 2'd2; ark_sel = 1'b1;
    end
  end

  assign busy       = kbusy || ((cyc != 5'd0) && (cyc != 5'd17));
  assign dout_valid = (cyc >= 5'd14);

  aes_key_schedule u_keys (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (kload || accept),
    .key_in    (kload ? key : last_key_q),
    .rcon_init (kload ? RCON_FIRST : RCON_LAST),
    .step_fwd  (kbusy),
    .step_bwd  (step),
    .round_key (rk)
  );

  aes_shift_rows u_isr (.din(sb), .inv(1'b1), .dout(sr));

  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_imc (.din(ark[127-32*c -: 32]), .inv(1'b1), .dout(imc[127-32*c -: 32]));
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int B = 127 - 8*(r + 4*c);
      byte_t data_in;
      if (c == 3) begin : g_edge
        assign data_in = din[31-8*r -: 8];
      end else begin : g_inner
        assign data_in = q[127-8*(r+4*(c+1)) -: 8];
      end
      aes_state_cell_dec u_cell (
        .clk         (clk),
        .rst_n       (rst_n),
        .en          (en),
        .reg_sel     (reg_sel),
        .ark_sel     (ark_sel),
        .data_in     (data_in),
        .after_mix   (imc[B -: 8]),
        .after_shift (sr[B -: 8]),
        .round_key   (rk[B -: 8]),
        .data_out    (q[B -: 8]),
        .sub_out     (sb[B -: 8]),
        .ark_out     (ark[B -: 8])
      );
    end
  end

  assign dout = q[127:96];

endmodule
