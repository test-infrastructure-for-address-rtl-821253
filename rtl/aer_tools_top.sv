// aer_tools_top: the two AER test instruments side by side.
//
// usb_* is the USB-AER board logic (mapper, frame monitor with VGA output,
// frame-to-AER sequencer, event capture and playback, around a 512K x 32
// SRAM bank and a microcontroller bus). pci_* is the PCI-AER board logic
// (timestamped event monitoring and sequencing between AER ports and host
// FIFOs). The boards are separate instruments with their own clocks and
// resets; in a test set-up they are chained through their AER ports with
// the chips under test between them (for example PCI-AER sequencer ->
// USB-AER mapper -> PCI-AER monitor). That wiring, the SRAM chip, the
// microcontroller and the PCI bus logic are outside this module; their
// signals are its ports. Parameters keep the boards' sizes by default.
module aer_tools_top
  import aer_pkg::*;
#(
  parameter int unsigned REC_DEPTH  = 524288,
  parameter int unsigned PIX_W      = 14,
  parameter int unsigned LVL_W      = 8,
  parameter int unsigned FIFO_DEPTH = 512
) (
  // ---------------- USB-AER board ----------------
  input  logic        usb_clk,
  input  logic        usb_rst_n,
  input  logic        usb_aer_in_req,
  input  aer_addr_t   usb_aer_in_data,
  output logic        usb_aer_in_ack,
  output logic        usb_aer_out_req,
  output aer_addr_t   usb_aer_out_data,
  input  logic        usb_aer_out_ack,
  output mem_addr_t   usb_sram_addr,
  output mem_data_t   usb_sram_wdata,
  output logic        usb_sram_we,
  output logic        usb_sram_oe,
  input  mem_data_t   usb_sram_rdata,
  input  logic        usb_host_valid,
  input  logic        usb_host_we,
  input  logic        usb_host_reg,
  input  mem_addr_t   usb_host_addr,
  input  mem_data_t   usb_host_wdata,
  output logic        usb_host_rvalid,
  output mem_data_t   usb_host_rdata,
  output logic        usb_mon_disp_bank,
  output logic        usb_mon_frame_done,
  output logic        usb_vga_hsync,
  output logic        usb_vga_vsync,
  output logic        usb_vga_de,
  output logic [LVL_W-1:0] usb_vga_grey,
  // ---------------- PCI-AER board ----------------
  input  logic        pci_clk,
  input  logic        pci_rst_n,
  input  logic        pci_mon_en,
  input  logic        pci_seq_en,
  input  logic [31:0] pci_tick_div,
  input  logic        pci_aer_in_req,
  input  aer_addr_t   pci_aer_in_data,
  output logic        pci_aer_in_ack,
  output logic        pci_aer_out_req,
  output aer_addr_t   pci_aer_out_data,
  input  logic        pci_aer_out_ack,
  output logic        pci_mon_valid,
  output ts_event_t   pci_mon_data,
  input  logic        pci_mon_ready,
  output logic [$clog2(FIFO_DEPTH):0] pci_mon_level,
  input  logic        pci_seq_valid,
  input  ts_event_t   pci_seq_data,
  output logic        pci_seq_ready,
  output logic [$clog2(FIFO_DEPTH):0] pci_seq_level,
  output logic [31:0] pci_rx_count,
  output logic [31:0] pci_tx_count
);
  usb_aer_core #(.REC_DEPTH(REC_DEPTH), .PIX_W(PIX_W), .LVL_W(LVL_W)) u_usb (
    .clk(usb_clk), .rst_n(usb_rst_n),
    .aer_in_req(usb_aer_in_req), .aer_in_data(usb_aer_in_data),
    .aer_in_ack(usb_aer_in_ack),
    .aer_out_req(usb_aer_out_req), .aer_out_data(usb_aer_out_data),
    .aer_out_ack(usb_aer_out_ack),
    .sram_addr(usb_sram_addr), .sram_wdata(usb_sram_wdata),
    .sram_we(usb_sram_we), .sram_oe(usb_sram_oe),
    .sram_rdata(usb_sram_rdata),
    .host_valid(usb_host_valid), .host_we(usb_host_we),
    .host_reg(usb_host_reg), .host_addr(usb_host_addr),
    .host_wdata(usb_host_wdata), .host_rvalid(usb_host_rvalid),
    .host_rdata(usb_host_rdata),
    .mon_disp_bank(usb_mon_disp_bank), .mon_frame_done(usb_mon_frame_done),
    .vga_hsync(usb_vga_hsync), .vga_vsync(usb_vga_vsync),
    .vga_de(usb_vga_de), .vga_grey(usb_vga_grey)
  );

  pci_aer_core #(.FIFO_DEPTH(FIFO_DEPTH)) u_pci (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .mon_en(pci_mon_en), .seq_en(pci_seq_en), .tick_div(pci_tick_div),
    .aer_in_req(pci_aer_in_req), .aer_in_data(pci_aer_in_data),
    .aer_in_ack(pci_aer_in_ack),
    .aer_out_req(pci_aer_out_req), .aer_out_data(pci_aer_out_data),
    .aer_out_ack(pci_aer_out_ack),
    .mon_valid(pci_mon_valid), .mon_data(pci_mon_data),
    .mon_ready(pci_mon_ready), .mon_level(pci_mon_level),
    .seq_valid(pci_seq_valid), .seq_data(pci_seq_data),
    .seq_ready(pci_seq_ready), .seq_level(pci_seq_level),
    .rx_count(pci_rx_count), .tx_count(pci_tx_count)
  );
endmodule
