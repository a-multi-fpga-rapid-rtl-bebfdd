// tb_aes_dec_iter: key setup followed by decryption of the standard's
// known-answer blocks and of random blocks (several per key); checks the
// plaintext against the reference, the 12-cycle block latency and the
// 12-cycle key setup.
module tb_aes_dec_iter;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, key_setup = 0, done, busy, key_ready;
  logic [127:0] din = '0, key = '0, dout;
  int checks = 0, failures = 0;

  aes_dec_iter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setup(logic [127:0] k);
    int cycles = 0;
    @(negedge clk); key = k; key_setup = 1;
    @(negedge clk); key_setup = 0; key = rand128(); cycles = 1;
    while (!key_ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL key setup %0d cycles", cycles); end
  endtask

  task automatic run(logic [127:0] ct, logic [127:0] exp);
    int cycles = 0;
    @(negedge clk); din = ct; start = 1;
    @(negedge clk); start = 0; din = rand128(); cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL ct=%h got %h exp %h", ct, dout, exp); end
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL latency %0d cycles, expected 12", cycles); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    setup(KAT_KEY0); run(KAT_CT0, KAT_PT0);
    setup(KAT_KEY1); run(KAT_CT1, KAT_PT1);
    for (int n = 0; n < 10; n++) begin
      logic [127:0] k;
      k = rand128();
      setup(k);
      for (int m = 0; m < 3; m++) begin
        logic [127:0] c;
        c = rand128();
        run(c, decrypt(c, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
