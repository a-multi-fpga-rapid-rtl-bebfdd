// aes_ctrl_unit: board control unit in FPGA1 of the multi-AES system.
//
// It decodes the 12-bit local-bus word address into chip selects for the
// four AES wrappers (one per FPGA) and for the JTAG configuration controller,
// and raises the interrupt line towards the PCI controller when an enabled
// core has finished.
// Address map (word addresses):
//   000h-0FFh FPGA1 wrapper   100h-1FFh FPGA2   200h-2FFh FPGA3   300h-3FFh FPGA4
//   400h      INT_EN   r/w  bits3:0 interrupt enable per FPGA
//   401h      INT_STAT r    bits3:0 done flags of the four wrappers
//   410h-41Fh JTAG configuration controller
// Chip selects are combinational and only active during a bus access
// (!wr_n or !rd_n). int_o = |(done & enable), a level; the PCI controller's
// interrupt input is edge triggered and latches its rising edge.
// The chip-select and interrupt roles are from the design's block diagram;
// the address map and register layout are this design's choices.
module aes_ctrl_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] la,
  input  logic        wr_n,
  input  logic        rd_n,
  input  logic [15:0] wdata,
  input  logic [3:0]  done,
  output logic [3:0]  cs_aes,
  output logic        cs_jtag,
  output logic [15:0] rdata,
  output logic        int_o
);

  logic [3:0] int_en_q;
  logic       access, cs_regs, wr_n_q;

  assign access  = !wr_n || !rd_n;
  assign cs_regs = access && la[11:8] == 4'h4 && la[7:4] == 4'h0;
  assign cs_jtag = access && la[11:8] == 4'h4 && la[7:4] == 4'h1;

  always_comb begin
    cs_aes = '0;
    if (access && la[11:10] == 2'b00) cs_aes[la[9:8]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_en_q <= '0;
      wr_n_q   <= 1'b1;
    end else begin
      wr_n_q <= wr_n;
      if (cs_regs && !wr_n && wr_n_q && la[3:0] == 4'h0) int_en_q <= wdata[3:0];
    end
  end

  always_comb begin
    rdata = '0;
    if (cs_regs && !rd_n) begin
      unique case (la[3:0])
        4'h0:    rdata = {12'd0, int_en_q};
        4'h1:    rdata = {12'd0, done};
        default: rdata = '0;
      endcase
    end
  end

  assign int_o = |(done & int_en_q);

endmodule
