// tb_aes_mix_column: MixColumns and InvMixColumns of random columns against
// the reference matrix multiplication, plus a known column of the standard.
module tb_aes_mix_column;
  import aes_ref_pkg::*;
  logic [31:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;

  aes_mix_column dut (.din(din), .inv(inv), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 32'hdb135345; inv = 0; #1;
    checks++;
    if (dout !== 32'h8e4da1bc) begin failures++; $display("FAIL kat fwd %h", dout); end
    din = 32'h8e4da1bc; inv = 1; #1;
    checks++;
    if (dout !== 32'hdb135345) begin failures++; $display("FAIL kat inv %h", dout); end
    for (int n = 0; n < 500; n++) begin
      din = $urandom; inv = n[0]; #1;
      checks++;
      if (dout !== mix_col(din, inv)) begin
        failures++; $display("FAIL din=%h inv=%0d got %h exp %h", din, inv, dout, mix_col(din, inv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
