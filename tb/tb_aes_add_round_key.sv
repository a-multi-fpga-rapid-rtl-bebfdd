// tb_aes_add_round_key: random state/key pairs, output compared with a
// byte-by-byte XOR, and the first AddRoundKey of the standard's example.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] state, round_key, dout, exp;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state(state), .round_key(round_key), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state = KAT_PT0; round_key = KAT_KEY0; #1;
    checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL kat %h", dout); end
    for (int n = 0; n < 200; n++) begin
      state = rand128(); round_key = rand128(); #1;
      for (int k = 0; k < 16; k++) exp[8*k +: 8] = state[8*k +: 8] ^ round_key[8*k +: 8];
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL %h ^ %h = %h", state, round_key, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
