// aes_shift_rows: ShiftRows and InvShiftRows of a 128-bit state.
//
// Row r of the state is rotated by r byte positions: to the left for
// ShiftRows (inv = 0), to the right for InvShiftRows (inv = 1). The
// permutation is pure wiring. Rows 0 and 2 move the same way in both
// directions, so only rows 1 and 3 pass through a 2:1 multiplexer, as in the
// design. Combinational.
//
// Interface: din (state, byte r+4c is row r column c), inv; dout.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t din,
  input  logic   inv,
  output block_t dout
);

  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      // rows 0 and 2: same routing for both directions
      dout[127-8*(0+4*c) -: 8] = din[127-8*(0+4*c) -: 8];
      dout[127-8*(2+4*c) -: 8] = din[127-8*(2+4*((c+2)%4)) -: 8];
      // rows 1 and 3: left rotation for ShiftRows, right rotation for the inverse
      dout[127-8*(1+4*c) -: 8] = inv ? din[127-8*(1+4*((c+3)%4)) -: 8]
                                     : din[127-8*(1+4*((c+1)%4)) -: 8];
      dout[127-8*(3+4*c) -: 8] = inv ? din[127-8*(3+4*((c+1)%4)) -: 8]
                                     : din[127-8*(3+4*((c+3)%4)) -: 8];
    end
  end

endmodule
