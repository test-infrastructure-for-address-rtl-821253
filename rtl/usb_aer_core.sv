// usb_aer_core: FPGA logic of the USB-AER board.
//
// The board sits on an AER bus with one input and one output port, owns a
// 512K x 32 SRAM bank and is loaded and controlled by a microcontroller
// (which provides USB and the MMC/SD card). The FPGA takes one of several
// functions, chosen here by the MODE register:
//   MAPPER   AER in -> aer_mapper (table in SRAM) -> AER out
//   MONITOR  AER in -> frame_monitor (event counts per pixel in SRAM)
//   SEQ      frame in SRAM -> frame_sequencer (exhaustive/random) -> AER out
//   CAPTURE  AER in -> event_timestamper -> event_store (SRAM)
//   PLAY     event_store (SRAM) -> event_player -> AER out
//   IDLE     AER ports idle; the host loads or reads the SRAM
// In MONITOR mode vga_frame_out also shows the last complete frame on a
// VGA monitor. On the board each function is a separate FPGA configuration; keeping them
// in one design behind a mode register is this design's choice.
//
// Host bus (the microcontroller side; its form is this design's choice):
// a request is host_valid with host_we, host_reg (1 = register, 0 = SRAM
// word), host_addr and host_wdata. It is always taken at once; read data
// return on host_rdata with host_rvalid one clock later. SRAM priority:
// host first, then the VGA line fetch, then the active function, which
// waits for the cycle.
// Registers (host_addr[3:0]):
//   0 CTRL   [2:0] mode, [3] mapper one-to-several, [4] sequencer random
//            method, [5] playback loop
//   1 TICK   clocks per time-base tick minus one (timestamps, playback)
//   2 FRAME  monitor frame period in clocks
//   3 SLICE  sequencer minimum clocks per slice
//   4 CMD    write 1 to [0]: clear recording, to [1]: rewind playback
//   5 RXCNT  events received     6 TXCNT  events sent
//   7 STATUS [0] playback done, [1] recording full, [2] displayed bank
//   8 RECCNT events recorded     9 MONFRM frames counted
//  10 SEQFRM frames sequenced   11 MAPOUT events produced by the mapper
//  12 MAPIN  events taken by the mapper
//  13 MONSAT pixel counts that hit the maximum grey level
//  14 SEQEVT events produced by the sequencer
//
// SRAM pins: address, write data and write/output enables are registered,
// so a request made in one clock drives the chip during the next, and read
// data are taken from sram_rdata at the end of that clock (one clock of read
// latency; the 12 ns part fits a clock period above about 15 ns with board
// delays).
module usb_aer_core
  import aer_pkg::*;
#(
  parameter int unsigned REC_DEPTH = 524288,  // 512K events
  parameter int unsigned PIX_W     = 14,      // 128 x 128
  parameter int unsigned LVL_W     = 8        // 256 grey levels
) (
  input  logic        clk,
  input  logic        rst_n,
  // AER input port
  input  logic        aer_in_req,
  input  aer_addr_t   aer_in_data,
  output logic        aer_in_ack,
  // AER output port
  output logic        aer_out_req,
  output aer_addr_t   aer_out_data,
  input  logic        aer_out_ack,
  // SRAM bank
  output mem_addr_t   sram_addr,
  output mem_data_t   sram_wdata,
  output logic        sram_we,
  output logic        sram_oe,
  input  mem_data_t   sram_rdata,
  // microcontroller bus
  input  logic        host_valid,
  input  logic        host_we,
  input  logic        host_reg,
  input  mem_addr_t   host_addr,
  input  mem_data_t   host_wdata,
  output logic        host_rvalid,
  output mem_data_t   host_rdata,
  // frame monitor state, for a display
  output logic        mon_disp_bank,
  output logic        mon_frame_done,
  // VGA monitor
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_de,
  output logic [LVL_W-1:0] vga_grey
);
  // ---------------- registers ----------------
  usb_mode_e   mode;
  logic        map_multi, seq_random, play_loop;
  logic [31:0] tick_div, frame_cycles, slice_cycles;
  logic        rec_start, play_start;

  // ---------------- time base ----------------
  logic [31:0] tick_cnt;
  logic        tick;
  assign tick = (tick_cnt >= tick_div);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    tick_cnt <= '0;
    else if (tick) tick_cnt <= '0;
    else           tick_cnt <= tick_cnt + 32'd1;
  end

  // ---------------- AER ports ----------------
  logic      rx_valid, rx_ready;
  aer_addr_t rx_addr;
  logic      tx_valid, tx_ready;
  aer_addr_t tx_addr;
  logic [31:0] rx_count, tx_count;

  aer_rx u_rx (
    .clk, .rst_n, .aer_req(aer_in_req), .aer_data(aer_in_data),
    .aer_ack(aer_in_ack), .ev_valid(rx_valid), .ev_addr(rx_addr),
    .ev_ready(rx_ready), .ev_count(rx_count)
  );

  aer_tx u_tx (
    .clk, .rst_n, .ev_valid(tx_valid), .ev_addr(tx_addr), .ev_ready(tx_ready),
    .aer_req(aer_out_req), .aer_data(aer_out_data), .aer_ack(aer_out_ack),
    .ev_count(tx_count)
  );

  // ---------------- memory clients ----------------
  localparam int unsigned NCLI = 5;
  localparam int unsigned C_MAP = 0, C_MON = 1, C_SEQ = 2, C_STORE = 3,
                          C_VGA = 4;
  mem_req_t cli_req [NCLI];
  mem_rsp_t cli_rsp [NCLI];

  // ---- mapper
  logic      map_in_ready, map_out_valid;
  aer_addr_t map_out_addr;
  logic [31:0] map_in_count, map_out_count;
  aer_mapper u_mapper (
    .clk, .rst_n, .enable(mode == MODE_MAPPER), .multi(map_multi),
    .in_valid(rx_valid && mode == MODE_MAPPER), .in_addr(rx_addr),
    .in_ready(map_in_ready), .out_valid(map_out_valid),
    .out_addr(map_out_addr), .out_ready(tx_ready && mode == MODE_MAPPER),
    .mem_req(cli_req[C_MAP]), .mem_rsp(cli_rsp[C_MAP]),
    .in_count(map_in_count), .out_count(map_out_count)
  );

  // ---- monitor
  logic        mon_in_ready;
  logic [31:0] mon_frames, mon_sat;
  frame_monitor #(.PIX_W(PIX_W), .CNT_W(LVL_W)) u_monitor (
    .clk, .rst_n, .enable(mode == MODE_MONITOR), .frame_cycles,
    .in_valid(rx_valid && mode == MODE_MONITOR), .in_addr(rx_addr),
    .in_ready(mon_in_ready), .mem_req(cli_req[C_MON]),
    .mem_rsp(cli_rsp[C_MON]), .disp_bank(mon_disp_bank),
    .frame_count(mon_frames), .frame_done(mon_frame_done),
    .sat_count(mon_sat)
  );

  // ---- sequencer
  logic      seq_valid;
  aer_addr_t seq_addr;
  logic [31:0] seq_frames, seq_events;
  frame_sequencer #(.PIX_W(PIX_W), .LVL_W(LVL_W)) u_seq (
    .clk, .rst_n, .enable(mode == MODE_SEQ), .method(seq_random),
    .slice_cycles, .out_valid(seq_valid), .out_addr(seq_addr),
    .out_ready(tx_ready && mode == MODE_SEQ), .mem_req(cli_req[C_SEQ]),
    .mem_rsp(cli_rsp[C_SEQ]), .frame_count(seq_frames),
    .event_count(seq_events)
  );

  // ---- capture and playback
  logic      ts_in_ready, ts_valid, st_in_ready, st_valid, pl_in_ready;
  logic      pl_valid;
  ts_event_t ts_event, st_event;
  aer_addr_t pl_addr;
  logic [19:0] rec_count;
  logic        rec_full, play_done;

  event_timestamper u_ts (
    .clk, .rst_n, .enable(mode == MODE_CAPTURE), .tick,
    .in_valid(rx_valid && mode == MODE_CAPTURE), .in_addr(rx_addr),
    .in_ready(ts_in_ready), .out_valid(ts_valid), .out_event(ts_event),
    .out_ready(st_in_ready)
  );

  event_store #(.DEPTH(REC_DEPTH)) u_store (
    .clk, .rst_n, .rec_start, .rec_en(mode == MODE_CAPTURE), .play_start,
    .play_en(mode == MODE_PLAY), .loop(play_loop),
    .in_valid(ts_valid), .in_event(ts_event), .in_ready(st_in_ready),
    .out_valid(st_valid), .out_event(st_event), .out_ready(pl_in_ready),
    .mem_req(cli_req[C_STORE]), .mem_rsp(cli_rsp[C_STORE]),
    .rec_count, .full(rec_full), .done(play_done)
  );

  event_player u_player (
    .clk, .rst_n, .enable(mode == MODE_PLAY), .tick,
    .in_valid(st_valid), .in_event(st_event), .in_ready(pl_in_ready),
    .out_valid(pl_valid), .out_addr(pl_addr),
    .out_ready(tx_ready && mode == MODE_PLAY)
  );

  // ---- VGA display of the monitored frame
  vga_frame_out #(.COL_W(PIX_W / 2), .ROW_W(PIX_W - PIX_W / 2),
                  .LVL_W(LVL_W)) u_vga (
    .clk, .rst_n, .enable(mode == MODE_MONITOR), .disp_bank(mon_disp_bank),
    .mem_req(cli_req[C_VGA]), .mem_rsp(cli_rsp[C_VGA]),
    .vga_hsync, .vga_vsync, .vga_de, .vga_grey
  );

  // ---------------- stream routing ----------------
  always_comb begin
    rx_ready = 1'b0;
    tx_valid = 1'b0;
    tx_addr  = '0;
    unique case (mode)
      MODE_MAPPER: begin
        rx_ready = map_in_ready;
        tx_valid = map_out_valid;
        tx_addr  = map_out_addr;
      end
      MODE_MONITOR: rx_ready = mon_in_ready;
      MODE_SEQ: begin
        tx_valid = seq_valid;
        tx_addr  = seq_addr;
      end
      MODE_CAPTURE: rx_ready = ts_in_ready;
      MODE_PLAY: begin
        tx_valid = pl_valid;
        tx_addr  = pl_addr;
      end
      default: ;
    endcase
  end

  // ---------------- SRAM arbitration ----------------
  logic     host_mem, vga_mem;
  mem_req_t grant_req;
  logic     rd_host_q;
  logic [NCLI-1:0] rd_cli_q;
  int unsigned     act;

  assign host_mem = host_valid && !host_reg;
  assign vga_mem  = (mode == MODE_MONITOR) && cli_req[C_VGA].req;

  always_comb begin
    unique case (mode)
      MODE_MAPPER:  act = C_MAP;
      MODE_MONITOR: act = C_MON;
      MODE_SEQ:     act = C_SEQ;
      default:      act = C_STORE;
    endcase
  end

  always_comb begin
    if (host_mem) begin
      grant_req = '{req: 1'b1, we: host_we, addr: host_addr, wdata: host_wdata};
    end else if (vga_mem) begin
      grant_req = cli_req[C_VGA];
    end else if (mode != MODE_IDLE) begin
      grant_req = cli_req[act];
    end else begin
      grant_req = '0;
    end
    for (int i = 0; i < NCLI; i++) begin
      cli_rsp[i].gnt    = !host_mem && (mode != MODE_IDLE) && (act == i) &&
                          !vga_mem;
      cli_rsp[i].rvalid = rd_cli_q[i];
      cli_rsp[i].rdata  = sram_rdata;
    end
    cli_rsp[C_VGA].gnt = !host_mem && (mode == MODE_MONITOR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_wdata <= '0;
      sram_we    <= 1'b0;
      sram_oe    <= 1'b0;
      rd_host_q  <= 1'b0;
      rd_cli_q   <= '0;
    end else begin
      sram_addr  <= grant_req.addr;
      sram_wdata <= grant_req.wdata;
      sram_we    <= grant_req.req && grant_req.we;
      sram_oe    <= grant_req.req && !grant_req.we;
      rd_host_q  <= host_mem && !host_we;
      for (int i = 0; i < NCLI; i++)
        rd_cli_q[i] <= cli_rsp[i].gnt && cli_req[i].req && !cli_req[i].we;
    end
  end

  // ---------------- host registers ----------------
  logic      reg_rd_q;
  mem_data_t reg_rdata_q;
  mem_data_t reg_rdata;

  always_comb begin
    unique case (host_addr[3:0])
      4'd0:    reg_rdata = {26'd0, play_loop, seq_random, map_multi, mode};
      4'd1:    reg_rdata = tick_div;
      4'd2:    reg_rdata = frame_cycles;
      4'd3:    reg_rdata = slice_cycles;
      4'd5:    reg_rdata = rx_count;
      4'd6:    reg_rdata = tx_count;
      4'd7:    reg_rdata = {29'd0, mon_disp_bank, rec_full, play_done};
      4'd8:    reg_rdata = {12'd0, rec_count};
      4'd9:    reg_rdata = mon_frames;
      4'd10:   reg_rdata = seq_frames;
      4'd11:   reg_rdata = map_out_count;
      4'd12:   reg_rdata = map_in_count;
      4'd13:   reg_rdata = mon_sat;
      4'd14:   reg_rdata = seq_events;
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_IDLE;
      map_multi    <= 1'b0;
      seq_random   <= 1'b0;
      play_loop    <= 1'b0;
      tick_div     <= '0;
      frame_cycles <= 32'd1_000_000;
      slice_cycles <= '0;
      rec_start    <= 1'b0;
      play_start   <= 1'b0;
      reg_rd_q     <= 1'b0;
      reg_rdata_q  <= '0;
    end else begin
      rec_start  <= 1'b0;
      play_start <= 1'b0;
      reg_rd_q   <= host_valid && host_reg && !host_we;
      reg_rdata_q <= reg_rdata;
      if (host_valid && host_reg && host_we) begin
        unique case (host_addr[3:0])
          4'd0: begin
            mode       <= usb_mode_e'(host_wdata[2:0]);
            map_multi  <= host_wdata[3];
            seq_random <= host_wdata[4];
            play_loop  <= host_wdata[5];
          end
          4'd1: tick_div     <= host_wdata;
          4'd2: frame_cycles <= host_wdata;
          4'd3: slice_cycles <= host_wdata;
          4'd4: begin
            rec_start  <= host_wdata[0];
            play_start <= host_wdata[1];
          end
          default: ;
        endcase
      end
    end
  end

  assign host_rvalid = rd_host_q || reg_rd_q;
  assign host_rdata  = reg_rd_q ? reg_rdata_q : sram_rdata;
endmodule
