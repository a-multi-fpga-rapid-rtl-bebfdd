// tb_aes_state_cell_dec: drives every multiplexer setting of the decryption
// State Cell with random bytes and checks the register, inverse S-box and
// AddRoundKey outputs; also checks that en = 0 holds the register.
module tb_aes_state_cell_dec;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, ark_sel = 0;
  logic [1:0] reg_sel = 0;
  logic [7:0] data_in = 0, after_mix = 0, after_shift = 0, round_key = 0, data_out, sub_out, ark_out;
  int checks = 0, failures = 0;
  logic [7:0] exp, x;

  aes_state_cell_dec dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_tables();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      data_in = $urandom; after_mix = $urandom; after_shift = $urandom; round_key = $urandom;
      en = (n % 7 != 3); ark_sel = $urandom; reg_sel = 2'($urandom % 3);
      x = (ark_sel ? after_shift : data_in) ^ round_key;
      #1;
      checks++;
      if (ark_out !== x) begin failures++; $display("FAIL ark_out got %02h exp %02h", ark_out, x); end
      if (!en) exp = data_out;
      else case (reg_sel)
        2'd0: exp = data_in;
        2'd1: exp = after_mix;
        default: exp = x;
      endcase
      @(negedge clk);
      checks++;
      if (data_out !== exp) begin failures++; $display("FAIL n=%0d reg_sel=%0d got %02h exp %02h", n, reg_sel, data_out, exp); end
      checks++;
      if (sub_out !== ISB[data_out]) begin failures++; $display("FAIL inv sbox %02h -> %02h", data_out, sub_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
