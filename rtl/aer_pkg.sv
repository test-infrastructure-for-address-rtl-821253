// aer_pkg: types and constants shared by the AER test instruments.
//
// An AER event on the board-to-board bus is a 16-bit address; a stored or
// monitored event is a 32-bit word holding a 16-bit timing field above the
// 16-bit address (two bytes of address plus two bytes of timing per event).
// The USB-AER board memory is a 512K x 32 SRAM bank, hence 19-bit word
// addresses and 32-bit data. Every block that uses the SRAM talks to it
// through the mem_req_t / mem_rsp_t pair defined here: a request is accepted
// in a cycle where gnt is high, and read data come back with rvalid exactly
// one clock later.
package aer_pkg;

  localparam int unsigned AER_AW  = 16;  // AER address width (2 bytes)
  localparam int unsigned TS_W    = 16;  // timing field width (2 bytes)
  localparam int unsigned MEM_AW  = 19;  // 512K words
  localparam int unsigned MEM_DW  = 32;

  typedef logic [AER_AW-1:0] aer_addr_t;
  typedef logic [TS_W-1:0]   aer_ts_t;
  typedef logic [MEM_AW-1:0] mem_addr_t;
  typedef logic [MEM_DW-1:0] mem_data_t;

  // Timestamped event as stored in memory or handed to a host.
  typedef struct packed {
    aer_ts_t   dt;    // ticks since the previous event
    aer_addr_t addr;  // AER address
  } ts_event_t;

  typedef struct packed {
    logic      req;
    logic      we;
    mem_addr_t addr;
    mem_data_t wdata;
  } mem_req_t;

  typedef struct packed {
    logic      gnt;
    logic      rvalid;
    mem_data_t rdata;
  } mem_rsp_t;

  // Function loaded into the USB-AER board FPGA.
  typedef enum logic [2:0] {
    MODE_IDLE    = 3'd0,  // host owns the SRAM, AER ports idle
    MODE_MAPPER  = 3'd1,  // event to one/several events through the mapping RAM
    MODE_MONITOR = 3'd2,  // AER to frame conversion (frame grabber)
    MODE_SEQ     = 3'd3,  // frame to AER conversion (exhaustive or random)
    MODE_CAPTURE = 3'd4,  // record timestamped events into the SRAM
    MODE_PLAY    = 3'd5   // play a recorded sequence back
  } usb_mode_e;

endpackage
