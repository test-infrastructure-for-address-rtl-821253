// pci_aer_core: FPGA logic of the PCI-AER board, without its PCI interface.
//
// The board sequences and monitors events for a host computer. Monitoring:
// events taken from the AER input port are tagged with their timing by
// event_timestamper and queued as {dt, addr} words in the monitor FIFO,
// which the host side (PCI target or bus master) drains through mon_*.
// Sequencing: the host side pushes {dt, addr} words into the sequencer
// FIFO through seq_*, and event_player sends each address on the AER output
// port once dt ticks have passed since the previous one. The two directions
// are independent and may run at once. The FIFOs absorb host bus latency;
// when the monitor FIFO is full the input port stops acknowledging, so
// events are delayed rather than lost.
//
// The PCI interface, its registers and its DMA are not part of this module:
// the FIFO ends and the control inputs are its ports. tick_div sets the
// time base (clocks per tick minus one). Per event the AER handshake takes
// about eight clocks, so the 15 Mevent/s aim needs a clock of 120 MHz or
// more on this logic. The FIFO depth is this design's choice.
module pci_aer_core
  import aer_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mon_en,
  input  logic        seq_en,
  input  logic [31:0] tick_div,
  // AER input port (monitor)
  input  logic        aer_in_req,
  input  aer_addr_t   aer_in_data,
  output logic        aer_in_ack,
  // AER output port (sequencer)
  output logic        aer_out_req,
  output aer_addr_t   aer_out_data,
  input  logic        aer_out_ack,
  // host side: monitored events
  output logic        mon_valid,
  output ts_event_t   mon_data,
  input  logic        mon_ready,
  output logic [$clog2(FIFO_DEPTH):0] mon_level,
  // host side: events to sequence
  input  logic        seq_valid,
  input  ts_event_t   seq_data,
  output logic        seq_ready,
  output logic [$clog2(FIFO_DEPTH):0] seq_level,
  // statistics
  output logic [31:0] rx_count,
  output logic [31:0] tx_count
);
  logic [31:0] tick_cnt;
  logic        tick;
  assign tick = (tick_cnt >= tick_div);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    tick_cnt <= '0;
    else if (tick) tick_cnt <= '0;
    else           tick_cnt <= tick_cnt + 32'd1;
  end

  // ---- monitor path
  logic      rx_valid, rx_ready, ts_valid, ts_ready;
  aer_addr_t rx_addr;
  ts_event_t ts_event;

  aer_rx u_rx (
    .clk, .rst_n, .aer_req(aer_in_req), .aer_data(aer_in_data),
    .aer_ack(aer_in_ack), .ev_valid(rx_valid), .ev_addr(rx_addr),
    .ev_ready(rx_ready), .ev_count(rx_count)
  );

  event_timestamper u_ts (
    .clk, .rst_n, .enable(mon_en), .tick,
    .in_valid(rx_valid), .in_addr(rx_addr), .in_ready(rx_ready),
    .out_valid(ts_valid), .out_event(ts_event), .out_ready(ts_ready)
  );

  sync_fifo #(.WIDTH($bits(ts_event_t)), .DEPTH(FIFO_DEPTH)) u_mon_fifo (
    .clk, .rst_n, .in_valid(ts_valid), .in_data(ts_event),
    .in_ready(ts_ready), .out_valid(mon_valid), .out_data(mon_data),
    .out_ready(mon_ready), .level(mon_level)
  );

  // ---- sequencer path
  logic      sf_valid, sf_ready, pl_valid, tx_ready;
  ts_event_t sf_event;
  aer_addr_t pl_addr;

  sync_fifo #(.WIDTH($bits(ts_event_t)), .DEPTH(FIFO_DEPTH)) u_seq_fifo (
    .clk, .rst_n, .in_valid(seq_valid), .in_data(seq_data),
    .in_ready(seq_ready), .out_valid(sf_valid), .out_data(sf_event),
    .out_ready(sf_ready), .level(seq_level)
  );

  event_player u_player (
    .clk, .rst_n, .enable(seq_en), .tick,
    .in_valid(sf_valid), .in_event(sf_event), .in_ready(sf_ready),
    .out_valid(pl_valid), .out_addr(pl_addr), .out_ready(tx_ready)
  );

  aer_tx u_tx (
    .clk, .rst_n, .ev_valid(pl_valid), .ev_addr(pl_addr), .ev_ready(tx_ready),
    .aer_req(aer_out_req), .aer_data(aer_out_data), .aer_ack(aer_out_ack),
    .ev_count(tx_count)
  );
endmodule
