// tb_aes_enc_iter: encrypts the standard's known-answer blocks and random
// blocks with the iterative core, checks each ciphertext against the
// reference, checks the 12-cycle latency from start to done, and that a
// start while busy is ignored.
module tb_aes_enc_iter;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [127:0] din = '0, key = '0, dout;
  int checks = 0, failures = 0;

  aes_enc_iter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] pt, logic [127:0] k, logic [127:0] exp);
    int cycles = 0;
    @(negedge clk); din = pt; key = k; start = 1;
    @(negedge clk); start = 0; din = rand128(); cycles = 1;  // edge 1 sampled start
    while (!done) begin
      if (cycles == 3) start = 1;                           // ignored: busy
      @(negedge clk); start = 0; cycles++;
    end
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL pt=%h key=%h got %h exp %h", pt, k, dout, exp); end
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL latency %0d cycles, expected 12", cycles); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(KAT_PT0, KAT_KEY0, KAT_CT0);
    run(KAT_PT1, KAT_KEY1, KAT_CT1);
    for (int n = 0; n < 40; n++) begin
      logic [127:0] p, k;
      p = rand128(); k = rand128();
      run(p, k, encrypt(p, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
