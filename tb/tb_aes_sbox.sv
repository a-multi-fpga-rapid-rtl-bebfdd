// tb_aes_sbox: exhaustive check of the combined S-box in both directions
// against the reference tables, plus known values of the AES standard.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;

  aes_sbox dut (.din(din), .inv(inv), .dout(dout));

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s din=%02h inv=%0d got %02h exp %02h", what, din, inv, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_tables();
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); inv = 0; #1; check(SB[i], "sbox");
      inv = 1; #1; check(ISB[i], "inv sbox");
    end
    din = 8'h00; inv = 0; #1; check(8'h63, "kat 00");
    din = 8'h53; inv = 0; #1; check(8'hed, "kat 53");
    din = 8'hed; inv = 1; #1; check(8'h53, "kat inv ed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
