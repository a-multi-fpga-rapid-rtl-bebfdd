// jtag_cfg_ctrl: JTAG master in FPGA1 that configures the other three FPGAs
// from the PCI bus (multi-FPGA mode).
//
// The host plays a boundary-scan (SVF-derived) bit stream into the JTAG chain
// of FPGA2..FPGA4 through this controller, up to eight bits per access:
//   offset 0 TMS  w  bits7:0 TMS values, bits10:8 number of bits - 1
//   offset 1 TDI  w  bits7:0 TDI values; writing starts the shift
//   offset 2 STAT r  bits7:0 TDO values of the last shift, bit15 busy
// Bits go out LSB first. Each bit takes two clk cycles (TCK = clk/2): TCK low
// with TMS/TDI set up, then TCK high; TDO is sampled on the clk edge that
// raises TCK, since the targets change TDO on falling TCK. TCK idles low.
// A write while busy is ignored. Writes happen once per access, on the first
// cycle of cs && !wr_n. Reads are combinational, 0 when not selected.
// That FPGA1 holds a controller conveying the bitstream from the PCI bus to
// the JTAG pins of the other FPGAs is from the design; the register
// interface and the bit timing are this design's choices.
module jtag_cfg_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs,
  input  logic        wr_n,
  input  logic        rd_n,
  input  logic [3:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo
);

  logic [7:0] tms_q, tdi_q, tdo_q;
  logic [2:0] nbits_q, bit_q;
  logic       busy, wr_n_q, wr_stb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_n_q <= 1'b1;
    else        wr_n_q <= wr_n | ~cs;
  end
  assign wr_stb = cs && !wr_n && wr_n_q && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tms_q   <= '0;
      tdi_q   <= '0;
      tdo_q   <= '0;
      nbits_q <= '0;
      bit_q   <= '0;
      busy    <= 1'b0;
      tck     <= 1'b0;
      tms     <= 1'b0;
      tdi     <= 1'b0;
    end else if (wr_stb && addr == 4'd0) begin
      tms_q   <= wdata[7:0];
      nbits_q <= wdata[10:8];
    end else if (wr_stb && addr == 4'd1) begin
      tdi_q <= wdata[7:0];
      busy  <= 1'b1;
      bit_q <= '0;
      tck   <= 1'b0;
      tms   <= tms_q[0];
      tdi   <= wdata[0];
    end else if (busy) begin
      if (!tck) begin
        tck          <= 1'b1;
        tdo_q[bit_q] <= tdo;
      end else begin
        tck <= 1'b0;
        if (bit_q == nbits_q) begin
          busy <= 1'b0;
        end else begin
          bit_q <= bit_q + 3'd1;
          tms   <= tms_q[bit_q + 3'd1];
          tdi   <= tdi_q[bit_q + 3'd1];
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (cs && !rd_n && addr == 4'd2) rdata = {busy, 7'd0, tdo_q};
  end

endmodule
