// tb_aes_shift_rows: random states through ShiftRows and InvShiftRows,
// compared with the reference; also checks a fixed pattern byte by byte.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.din(din), .inv(inv), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // byte k holds value k: ShiftRows output is 00 05 0a 0f 04 09 0e 03 ...
    din = 128'h000102030405060708090a0b0c0d0e0f; inv = 0; #1;
    checks++;
    if (dout !== 128'h00050a0f04090e03080d02070c01060b) begin failures++; $display("FAIL fixed fwd %h", dout); end
    inv = 1; #1;
    checks++;
    if (dout !== 128'h000d0a0704010e0b0805020f0c090603) begin failures++; $display("FAIL fixed inv %h", dout); end
    for (int n = 0; n < 200; n++) begin
      din = rand128(); inv = n[0]; #1;
      checks++;
      if (dout !== shift_rows(din, inv)) begin
        failures++; $display("FAIL din=%h inv=%0d got %h", din, inv, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
