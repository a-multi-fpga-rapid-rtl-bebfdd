// aes_state_cell_enc: one State Cell of the regular encryption unit.
//
// The cell keeps one byte of the AES state in an 8-bit register and owns the
// logic that works on that byte:
//   - an S-box on the register output ("after SubBytes", sent through the
//     ShiftRows wiring and the column's MixColumns unit),
//   - eight XOR gates for AddRoundKey,
//   - an AddRoundKey input multiplexer choosing data_in (the neighbour to the
//     right, or the external input for column 3), the MixColumns result or
//     the ShiftRows result,
//   - a state register input multiplexer choosing data_in (plain shift) or
//     the XOR output.
// The cell structure follows the design. The enable input (hold) and the
// mux encodings are this design's choices.
//
// Interface: en loads the register on the rising clk edge; reg_sel picks the
// register input, ark_sel the XOR input; data_out is the register, sub_out
// the S-box output. rst_n clears the register asynchronously.
module aes_state_cell_enc
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  reg_sel,        // 0: data_in, 1: AddRoundKey result
  input  logic  [1:0] ark_sel,  // 0: data_in, 1: after MixColumns, 2: after ShiftRows
  input  byte_t data_in,
  input  byte_t after_mix,
  input  byte_t after_shift,
  input  byte_t round_key,
  output byte_t data_out,
  output byte_t sub_out
);

  byte_t ark_in, ark_out;

  always_comb begin
    unique case (ark_sel)
      2'd1:    ark_in = after_mix;
      2'd2:    ark_in = after_shift;
      default: ark_in = data_in;
    endcase
    ark_out = ark_in ^ round_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_out <= '0;
    else if (en) data_out <= reg_sel ? ark_out : data_in;
  end

  aes_sbox u_sbox (.din(data_out), .inv(1'b0), .dout(sub_out));

endmodule
