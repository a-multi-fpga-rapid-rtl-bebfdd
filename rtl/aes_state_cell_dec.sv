// aes_state_cell_dec: one State Cell of the regular decryption unit.
//
// Like the encryption cell it holds one state byte in a register with an
// S-box (here the inverse S-box) on its output. The AddRoundKey XOR takes
// either data_in (initial round) or the InvShiftRows result for this
// position; its output leaves the cell ("after AddRoundKey") towards the
// column's InvMixColumns unit. The register input multiplexer selects
// data_in (shift), the InvMixColumns result (normal rounds) or the XOR
// output (initial and last round).
// The cell structure follows the design; enable and encodings are this
// design's choices.
//
// Interface: en loads the register on the rising clk edge; reg_sel picks the
// register input, ark_sel the XOR input; data_out is the register, sub_out
// the inverse S-box output, ark_out the AddRoundKey output.
module aes_state_cell_dec
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  [1:0] reg_sel,  // 0: data_in, 1: after InvMixColumns, 2: AddRoundKey result
  input  logic  ark_sel,        // 0: data_in, 1: after InvShiftRows
  input  byte_t data_in,
  input  byte_t after_mix,
  input  byte_t after_shift,
  input  byte_t round_key,
  output byte_t data_out,
  output byte_t sub_out,
  output byte_t ark_out
);

  always_comb ark_out = (ark_sel ? after_shift : data_in) ^ round_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_out <= '0;
    else if (en) begin
      unique case (reg_sel)
        2'd1:    data_out <= after_mix;
        2'd2:    data_out <= ark_out;
        default: data_out <= data_in;
      endcase
    end
  end

  aes_sbox u_sbox (.din(data_out), .inv(1'b1), .dout(sub_out));

endmodule
