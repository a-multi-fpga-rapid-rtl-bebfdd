// tb_jtag_cfg_ctrl: shifts random TMS/TDI patterns of 1..8 bits into a model
// of a three-device JTAG chain (each device in BYPASS: one flip-flop sampled
// on rising TCK, TDO updated on falling TCK). Checks the TMS and TDI values
// seen by the chain at every rising TCK, the number of TCK pulses, and the
// TDO bits the controller captured, which must be the TDI stream delayed by
// the three bypass stages.
module tb_jtag_cfg_ctrl;
  logic clk = 0, rst_n = 0, cs = 0, wr_n = 1, rd_n = 1;
  logic [3:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  jtag_cfg_ctrl dut (.*);
  always #5 clk = ~clk;

  // chain model
  logic [2:0] chain = '0;
  logic tdo_q = 0;
  bit seen_tms [$];
  bit seen_tdi [$];
  always @(posedge tck) begin
    chain <= {chain[1:0], tdi};
    seen_tms.push_back(tms);
    seen_tdi.push_back(tdi);
  end
  always @(negedge tck) tdo_q <= chain[2];
  assign tdo = tdo_q;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [3:0] a, logic [15:0] d);
    @(negedge clk); cs = 1; addr = a; wdata = d; wr_n = 0;
    @(negedge clk); wr_n = 1; cs = 0;
  endtask

  task automatic rd(logic [3:0] a, output logic [15:0] d);
    @(negedge clk); cs = 1; addr = a; rd_n = 0;
    #1 d = rdata;
    @(negedge clk); rd_n = 1; cs = 0;
  endtask

  bit history [$];   // every TDI bit sent so far, preceded by the chain's reset zeros

  initial begin
    logic [15:0] s;
    logic [7:0] tmsv, tdiv, expo;
    int nb;
    repeat (3) history.push_back(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      nb = 1 + ($urandom % 8);
      tmsv = 8'($urandom); tdiv = 8'($urandom);
      seen_tms.delete(); seen_tdi.delete();
      wr(4'd0, {5'd0, 3'(nb - 1), tmsv});
      wr(4'd1, {8'd0, tdiv});
      wr(4'd1, 16'h00ff);                 // ignored while busy
      do rd(4'd2, s); while (s[15]);
      for (int b = 0; b < nb; b++) begin
        expo[b] = history[history.size() - 3];
        history.push_back(tdiv[b]);
      end
      checks++;
      if (seen_tms.size() != nb) begin failures++; $display("FAIL %0d TCK pulses, expected %0d", seen_tms.size(), nb); end
      for (int b = 0; b < nb && b < seen_tms.size(); b++) begin
        checks++;
        if (seen_tms[b] != tmsv[b] || seen_tdi[b] != tdiv[b]) begin
          failures++; $display("FAIL bit %0d tms %0d/%0d tdi %0d/%0d", b, seen_tms[b], tmsv[b], seen_tdi[b], tdiv[b]);
        end
      end
      checks++;
      for (int b = 0; b < nb; b++) if (s[b] != expo[b]) begin
        failures++; $display("FAIL tdo bits %b expected %b (n=%0d)", s[7:0], expo, nb); break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
