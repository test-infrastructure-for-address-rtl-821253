// tb_demo_scenario: three instruments chained as in a typical demonstration
// set-up. One USB-AER board sequences a grey-level image (exhaustive
// method). A second USB-AER board, used as a mapper, rotates it by 90
// degrees. The PCI-AER logic monitors the rotated stream and hands
// timestamped events to the host.
//
// Each board has its own clock (10, 12 and 8 ns), so every AER link crosses
// clock domains through the port synchronisers. The boards are wired port
// to port with no models in between. Each USB board has its own SRAM model
// and host bus. The image is 8 x 8 with 16 levels and address y*8+x. The
// rotation maps (x, y) to (7-y, x) through a one-to-one table.
//
// Checks:
//  * the first frame reaching the host is exactly the exhaustive sequence
//    of the source image, each address rotated, in order;
//  * each rotated pixel receives as many events as its source grey level;
//  * every timestamp is at least the handshake time;
//  * the event counters of the three boards agree.
module tb_demo_scenario;
  import aer_pkg::*;
  localparam int PIX_W = 6, LVL_W = 4, NPIX = 64, NLEV = 16, N = 8;

  logic clk_a = 0, clk_b = 0, clk_p = 0, rst_n = 0;
  always #5 clk_a = ~clk_a;
  always #6 clk_b = ~clk_b;
  always #4 clk_p = ~clk_p;

  int checks = 0, failures = 0;

  // ---- AER links
  logic ab_req, ab_ack, bp_req, bp_ack;
  aer_addr_t ab_data, bp_data;
  // unused ports of the chain ends
  logic a_in_ack, p_out_req;
  aer_addr_t p_out_data;

  // ---- board A: sequencer
  mem_addr_t a_sram_addr, a_host_addr = '0;
  mem_data_t a_sram_wdata, a_sram_rdata, a_host_wdata = '0, a_host_rdata;
  logic a_sram_we, a_sram_oe, a_host_valid = 0, a_host_we = 0, a_host_reg = 0, a_host_rvalid;
  logic a_disp, a_fdone, a_hs, a_vs, a_de;
  logic [LVL_W-1:0] a_grey;

  usb_aer_core #(.REC_DEPTH(1024), .PIX_W(PIX_W), .LVL_W(LVL_W)) u_seq (
    .clk(clk_a), .rst_n,
    .aer_in_req(1'b0), .aer_in_data('0), .aer_in_ack(a_in_ack),
    .aer_out_req(ab_req), .aer_out_data(ab_data), .aer_out_ack(ab_ack),
    .sram_addr(a_sram_addr), .sram_wdata(a_sram_wdata), .sram_we(a_sram_we),
    .sram_oe(a_sram_oe), .sram_rdata(a_sram_rdata),
    .host_valid(a_host_valid), .host_we(a_host_we), .host_reg(a_host_reg),
    .host_addr(a_host_addr), .host_wdata(a_host_wdata),
    .host_rvalid(a_host_rvalid), .host_rdata(a_host_rdata),
    .mon_disp_bank(a_disp), .mon_frame_done(a_fdone),
    .vga_hsync(a_hs), .vga_vsync(a_vs), .vga_de(a_de), .vga_grey(a_grey));
  sram_model #(.AW(19)) sram_a (.clk(clk_a), .addr(a_sram_addr), .wdata(a_sram_wdata),
                                .we(a_sram_we), .oe(a_sram_oe), .rdata(a_sram_rdata));

  // ---- board B: mapper
  mem_addr_t b_sram_addr, b_host_addr = '0;
  mem_data_t b_sram_wdata, b_sram_rdata, b_host_wdata = '0, b_host_rdata;
  logic b_sram_we, b_sram_oe, b_host_valid = 0, b_host_we = 0, b_host_reg = 0, b_host_rvalid;
  logic b_disp, b_fdone, b_hs, b_vs, b_de;
  logic [LVL_W-1:0] b_grey;

  usb_aer_core #(.REC_DEPTH(1024), .PIX_W(PIX_W), .LVL_W(LVL_W)) u_map (
    .clk(clk_b), .rst_n,
    .aer_in_req(ab_req), .aer_in_data(ab_data), .aer_in_ack(ab_ack),
    .aer_out_req(bp_req), .aer_out_data(bp_data), .aer_out_ack(bp_ack),
    .sram_addr(b_sram_addr), .sram_wdata(b_sram_wdata), .sram_we(b_sram_we),
    .sram_oe(b_sram_oe), .sram_rdata(b_sram_rdata),
    .host_valid(b_host_valid), .host_we(b_host_we), .host_reg(b_host_reg),
    .host_addr(b_host_addr), .host_wdata(b_host_wdata),
    .host_rvalid(b_host_rvalid), .host_rdata(b_host_rdata),
    .mon_disp_bank(b_disp), .mon_frame_done(b_fdone),
    .vga_hsync(b_hs), .vga_vsync(b_vs), .vga_de(b_de), .vga_grey(b_grey));
  sram_model #(.AW(19)) sram_b (.clk(clk_b), .addr(b_sram_addr), .wdata(b_sram_wdata),
                                .we(b_sram_we), .oe(b_sram_oe), .rdata(b_sram_rdata));

  // ---- PCI-AER logic: monitor
  logic mon_valid, mon_ready = 0, seq_ready;
  ts_event_t mon_data;
  logic [9:0] mon_level, seq_level;
  logic [31:0] p_rx, p_tx;

  pci_aer_core u_pci (
    .clk(clk_p), .rst_n, .mon_en(1'b1), .seq_en(1'b0), .tick_div(32'd0),
    .aer_in_req(bp_req), .aer_in_data(bp_data), .aer_in_ack(bp_ack),
    .aer_out_req(p_out_req), .aer_out_data(p_out_data), .aer_out_ack(1'b0),
    .mon_valid, .mon_data, .mon_ready, .mon_level,
    .seq_valid(1'b0), .seq_data('0), .seq_ready, .seq_level,
    .rx_count(p_rx), .tx_count(p_tx));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // host bus of board A (b = 0) or B (b = 1)
  task automatic hwrite(bit b, bit reg_space, int addr, mem_data_t d);
    if (!b) begin
      @(negedge clk_a);
      a_host_valid = 1; a_host_we = 1; a_host_reg = reg_space;
      a_host_addr = mem_addr_t'(addr); a_host_wdata = d;
      @(negedge clk_a);
      a_host_valid = 0; a_host_we = 0;
    end else begin
      @(negedge clk_b);
      b_host_valid = 1; b_host_we = 1; b_host_reg = reg_space;
      b_host_addr = mem_addr_t'(addr); b_host_wdata = d;
      @(negedge clk_b);
      b_host_valid = 0; b_host_we = 0;
    end
  endtask

  task automatic hread(bit b, bit reg_space, int addr, output mem_data_t d);
    if (!b) begin
      @(negedge clk_a);
      a_host_valid = 1; a_host_we = 0; a_host_reg = reg_space;
      a_host_addr = mem_addr_t'(addr);
      @(negedge clk_a);
      a_host_valid = 0;
      d = a_host_rdata;
    end else begin
      @(negedge clk_b);
      b_host_valid = 1; b_host_we = 0; b_host_reg = reg_space;
      b_host_addr = mem_addr_t'(addr);
      @(negedge clk_b);
      b_host_valid = 0;
      d = b_host_rdata;
    end
  endtask

  // host side of the PCI logic: drain the monitor FIFO with random pauses
  ts_event_t got [$];
  bit take;
  always @(negedge clk_p) begin
    mon_ready = ($urandom % 3) != 0;
    #1 take = mon_valid && mon_ready;
    if (take) got.push_back(mon_data);
  end

  function automatic int rot(int a);
    int x, y;
    x = a % N;
    y = a / N;
    return x * N + (N - 1 - y);
  endfunction

  initial begin
    int g [NPIX];
    int cnt [NPIX];
    int total, mn_dt, x, y;
    mem_data_t d, da, db;
    aer_addr_t expq [$];

    // source image: an L shape at full level on a faint gradient
    total = 0;
    for (int p = 0; p < NPIX; p++) begin
      x = p % N;
      y = p / N;
      if (x == 1 || (y == 6 && x < 6)) g[p] = 15;
      else g[p] = (x + 2 * y) % 4;
      total += g[p];
    end
    for (int k = 0; k < NLEV; k++)
      for (int p = 0; p < NPIX; p++)
        if (((k * g[p]) % NLEV) + g[p] >= NLEV) expq.push_back(aer_addr_t'(rot(p)));

    repeat (4) @(negedge clk_a);
    rst_n = 1;

    // board B: rotation table, then mapper mode
    for (int p = 0; p < NPIX; p++) hwrite(1, 0, p, {1'b1, 15'd0, 16'(rot(p))});
    hwrite(1, 1, 0, 32'(MODE_MAPPER));
    // board A: image, slice length, then exhaustive sequencing
    for (int p = 0; p < NPIX; p++) hwrite(0, 0, p, 32'(g[p]));
    hwrite(0, 1, 3, 32'd150);
    hwrite(0, 1, 0, 32'(MODE_SEQ));

    while (got.size() < total) @(negedge clk_p);
    hwrite(0, 1, 0, 32'(MODE_IDLE));
    repeat (200) @(negedge clk_p);

    check(expq.size() == total, "exhaustive frame holds sum of grey levels");
    foreach (cnt[p]) cnt[p] = 0;
    mn_dt = 32'hFFFF;
    for (int i = 0; i < total; i++) begin
      check(got[i].addr == expq[i],
            $sformatf("event %0d: %0h expected %0h", i, got[i].addr, expq[i]));
      if (got[i].addr < NPIX) cnt[got[i].addr]++;
      if (i > 0 && got[i].dt < mn_dt) mn_dt = got[i].dt;
    end
    for (int p = 0; p < NPIX; p++)
      check(cnt[rot(p)] == g[p], $sformatf("rotated pixel %0d: %0d events, level %0d",
                                           rot(p), cnt[rot(p)], g[p]));
    check(mn_dt >= 4, $sformatf("shortest interval %0d ticks", mn_dt));

    // counters: events sent by A = taken and produced by B = received by PCI
    hread(0, 1, 6, da);
    hread(1, 1, 12, db);
    hread(1, 1, 11, d);
    check(da == db && db == d && d == p_rx && p_rx == got.size(),
          $sformatf("event counts %0d %0d %0d %0d %0d", da, db, d, p_rx, got.size()));
    check(p_rx >= total, "whole frame passed the chain");

    $display("demo: %0d events in the first frame, %0d in all, shortest interval %0d",
             total, got.size(), mn_dt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
