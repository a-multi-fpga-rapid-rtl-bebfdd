// aes_enc_regular: AES-128 encryption unit in the regular, scalable
// architecture (version 2 of the two cores of the system).
//
// The state lives in a 4 x 4 array of State Cells (aes_state_cell_enc), one
// per byte, laid out like the AES state. Each column has a MixColumns unit.
// The S-box outputs of all cells pass through the ShiftRows wiring to the
// cells and to the MixColumns units, so one clock edge performs a whole
// round. A small control unit (a cycle counter) sets the multiplexers of all
// cells and steps the on-the-fly key schedule.
//
// I/O is 32 bits wide, one state column per cycle. Data enters from the
// right (column 3) and shifts left; results leave from column 0.
// Handshake: start is accepted when the unit is idle (or in its last output
// cycle) and must come with column 0 on din; columns 1..3 follow on the next
// three cycles. key is sampled together with start.
// Timing in rising edges, edge 1 = the edge that samples start:
//   edges 1..3   shift in columns 0..2
//   edge 4       shift in column 3 together with the initial AddRoundKey
//   edges 5..13  the nine normal rounds
//   edge 14      final round (no MixColumns); column 0 of the result on dout
//   edges 15..17 shift out; columns 1..3 of the result on dout
// dout_valid is high while a result column is on dout (after edges 14..17),
// so one block takes 17 cycles, the count given for this architecture.
// Array, column I/O, the cycle split and the 17-cycle count follow the
// design; the start/dout_valid handshake is this design's choice.
module aes_enc_regular
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  word_t  din,
  input  block_t key,
  output word_t  dout,
  output logic   dout_valid,
  output logic   busy
);

  logic [4:0] cyc;     // 0 idle, 1..17 edges of the current block seen
  logic       accept;
  logic       en, reg_sel, step;
  logic [1:0] ark_sel;
  block_t     rk, q, sb, sr, mc;

  assign accept = start && (cyc == 5'd0 || cyc == 5'd17);

  // Control unit: cycle counter and decoded cell controls
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cyc <= '0;
    else if (accept)             cyc <= 5'd1;
    else if (cyc == 5'd17)       cyc <= '0;
    else if (cyc != 5'd0)        cyc <= cyc + 5'd1;
  end

  always_comb begin
    en      = accept || (cyc != 5'd0 && cyc != 5'd17);
    reg_sel = 1'b0;
    ark_sel = 2'd0;
    step    = 1'b0;
    if (cyc == 5'd3) begin                       // initial AddRoundKey
      reg_sel = 1'b1; ark_sel = 2'd0; step = 1'b1;
    end else if (cyc >= 5'd4 && cyc <= 5'd12) begin   // normal rounds
      reg_sel = 1'b1; ark_sel = 2'd1; step = 1'b1;
    end else if (cyc == 5'd13) begin             // final round
      reg_sel = 1'b1; ark_sel = 2'd2;
    end
  end

  assign busy       = (cyc != 5'd0) && (cyc != 5'd17);
  assign dout_valid = (cyc >= 5'd14);

  aes_key_schedule u_keys (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (accept),
    .key_in    (key),
    .rcon_init (RCON_FIRST),
    .step_fwd  (step),
    .step_bwd  (1'b0),
    .round_key (rk)
  );

  aes_shift_rows u_sr (.din(sb), .inv(1'b0), .dout(sr));

  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_mc (.din(sr[127-32*c -: 32]), .inv(1'b0), .dout(mc[127-32*c -: 32]));
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int B = 127 - 8*(r + 4*c);
      byte_t data_in;
      if (c == 3) begin : g_edge
        assign data_in = din[31-8*r -: 8];
      end else begin : g_inner
        assign data_in = q[127-8*(r+4*(c+1)) -: 8];
      end
      aes_state_cell_enc u_cell (
        .clk         (clk),
        .rst_n       (rst_n),
        .en          (en),
        .reg_sel     (reg_sel),
        .ark_sel     (ark_sel),
        .data_in     (data_in),
        .after_mix   (mc[B -: 8]),
        .after_shift (sr[B -: 8]),
        .round_key   (rk[B -: 8]),
        .data_out    (q[B -: 8]),
        .sub_out     (sb[B -: 8])
      );
    end
  end

  assign dout = q[127:96];

endmodule
