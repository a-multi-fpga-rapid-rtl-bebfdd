// tb_aes_key_schedule: walks the on-the-fly key schedule forward from the
// cipher key to round key 10, one key per cycle, and back again, comparing
// every round key with the reference expansion. Uses the standard's example
// key and random keys.
module tb_aes_key_schedule;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load = 0, step_fwd = 0, step_bwd = 0;
  logic [127:0] key_in = '0, round_key;
  logic [7:0] rcon_init = 8'h01;
  int checks = 0, failures = 0;
  rk_t exp;

  aes_key_schedule dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] e, string what, int i);
    checks++;
    if (round_key !== e) begin
      failures++; $display("FAIL %s round %0d got %h exp %h", what, i, round_key, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      logic [127:0] k;
      k = (t == 0) ? KAT_KEY0 : rand128();
      exp = expand(k);
      // forward walk
      @(negedge clk); load = 1; key_in = k; rcon_init = 8'h01;
      @(negedge clk); load = 0;
      check(exp[0], "fwd", 0);
      for (int i = 1; i <= 10; i++) begin
        step_fwd = 1; @(negedge clk); step_fwd = 0;
        check(exp[i], "fwd", i);
      end
      // backward walk from round key 10
      load = 1; key_in = exp[10]; rcon_init = 8'h36;
      @(negedge clk); load = 0;
      check(exp[10], "bwd", 10);
      for (int i = 9; i >= 0; i--) begin
        step_bwd = 1; @(negedge clk); step_bwd = 0;
        check(exp[i], "bwd", i);
      end
    end
    // standard's round key 10 for the example key
    checks++;
    if (expand(KAT_KEY0)[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL reference round key 10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
