// pci_mfcu_top: the logic of the PCI-mFCU multi-FPGA board running four AES
// cores, as seen from the local bus of the PCI controller.
//
// Four FPGAs each hold one AES core behind a register wrapper; all wrappers
// share the local address, data and read/write strobes and are told apart by
// chip selects from the control unit in FPGA1. The host writes a key and a
// block into a wrapper, starts it, polls (or takes the interrupt) and reads
// the result, so four blocks can be processed at the same time. FPGA1 also
// holds the JTAG controller that configures FPGA2..4 over the PCI bus.
//
// Ports are those of the local bus of the PCI controller: 12-bit word address
// la, 16-bit data split into ld_in / ld_out / ld_oe, active-low strobes,
// lreset_n, the interrupt line int_o, and the JTAG pins of the chain.
// KIND1..KIND4 choose the core configured into each FPGA. The board can hold
// any mix; the defaults load a different core into each FPGA so that all
// four cores of the design are present.
// Not modelled: the PCI controller, its EEPROM, the configuration PROM, and
// the board wiring (32-bit neighbour links, 12-bit on-board bus, extension
// headers); the shared local-bus lines drawn in the multi-AES block diagram
// stand for the physical routing.
module pci_mfcu_top
  import aes_pkg::*;
#(
  parameter core_kind_e KIND1 = CORE_ITER_ENC,
  parameter core_kind_e KIND2 = CORE_ITER_DEC,
  parameter core_kind_e KIND3 = CORE_REG_ENC,
  parameter core_kind_e KIND4 = CORE_REG_DEC
) (
  input  logic        lclk,
  input  logic        lreset_n,
  input  logic [11:0] la,
  input  logic [15:0] ld_in,
  output logic [15:0] ld_out,
  output logic        ld_oe,
  input  logic        wr_n,
  input  logic        rd_n,
  output logic        int_o,
  output logic        jtag_tck,
  output logic        jtag_tms,
  output logic        jtag_tdi,
  input  logic        jtag_tdo
);

  localparam core_kind_e KINDS [4] = '{KIND1, KIND2, KIND3, KIND4};

  logic [3:0]  cs_aes, done;
  logic        cs_jtag;
  logic [15:0] rd_aes [4];
  logic [15:0] rd_ctrl, rd_jtag;

  aes_ctrl_unit u_ctrl (
    .clk(lclk), .rst_n(lreset_n), .la(la), .wr_n(wr_n), .rd_n(rd_n),
    .wdata(ld_in), .done(done), .cs_aes(cs_aes), .cs_jtag(cs_jtag),
    .rdata(rd_ctrl), .int_o(int_o));

  jtag_cfg_ctrl u_jtag (
    .clk(lclk), .rst_n(lreset_n), .cs(cs_jtag), .wr_n(wr_n), .rd_n(rd_n),
    .addr(la[3:0]), .wdata(ld_in), .rdata(rd_jtag),
    .tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi), .tdo(jtag_tdo));

  for (genvar n = 0; n < 4; n++) begin : g_fpga
    aes_wrapper #(.KIND(KINDS[n])) u_wrap (
      .clk(lclk), .rst_n(lreset_n), .cs(cs_aes[n]), .wr_n(wr_n), .rd_n(rd_n),
      .addr(la[4:0]), .wdata(ld_in), .rdata(rd_aes[n]), .done_flag(done[n]));
  end

  assign ld_out = rd_aes[0] | rd_aes[1] | rd_aes[2] | rd_aes[3] | rd_ctrl | rd_jtag;
  assign ld_oe  = !rd_n && (|cs_aes || cs_jtag || (la[11:8] == 4'h4));

endmodule
