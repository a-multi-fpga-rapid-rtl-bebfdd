// tb_aes_ctrl_unit: sweeps the address space and checks the chip selects of
// the four wrappers and of the JTAG controller, their gating by the bus
// strobes, the interrupt enable register and the interrupt line for all
// done/enable combinations.
module tb_aes_ctrl_unit;
  logic clk = 0, rst_n = 0, wr_n = 1, rd_n = 1;
  logic [11:0] la = '0;
  logic [15:0] wdata = '0, rdata;
  logic [3:0] done = '0, cs_aes;
  logic cs_jtag, int_o;
  int checks = 0, failures = 0;

  aes_ctrl_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (la=%03h)", what, la); end
  endtask

  initial begin
    logic [3:0] exp_cs;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a += 3) begin
      @(negedge clk); la = 12'(a); rd_n = 1; wr_n = 1; #1;
      chk(cs_aes == 0 && !cs_jtag, "select without a bus access");
      rd_n = 0; #1;
      exp_cs = (a < 12'h400) ? 4'(1 << (a >> 8)) : 4'b0;
      chk(cs_aes == exp_cs, "wrapper chip select");
      chk(cs_jtag == (a >= 12'h410 && a < 12'h420), "jtag chip select");
    end
    @(negedge clk); rd_n = 1;
    // interrupt enable register and interrupt line
    for (int en = 0; en < 16; en++) begin
      @(negedge clk); la = 12'h400; wdata = 16'(en); wr_n = 0;
      @(negedge clk); wr_n = 1;
      @(negedge clk); rd_n = 0; #1;
      chk(rdata == 16'(en), "INT_EN read-back");
      @(negedge clk); rd_n = 1;
      for (int d = 0; d < 16; d++) begin
        done = 4'(d); #1;
        chk(int_o == ((d & en) != 0), "interrupt line");
        la = 12'h401; rd_n = 0; #1;
        chk(rdata == 16'(d), "INT_STAT");
        rd_n = 1; la = 12'h400;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
