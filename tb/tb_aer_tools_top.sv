// tb_aer_tools_top: end-to-end test of both instruments at their full
// sizes (no parameter overrides): 512K-event recording store, 128 x 128
// frames of 256 grey levels, 512-word host FIFOs.
//
// The boards are chained through their AER cables as in a test set-up:
//   PCI-AER sequencer -> USB-AER -> PCI-AER monitor
// and the USB-AER board is switched through its functions by its host bus:
//  1. mapper, one-to-several: each event from the PCI sequencer becomes
//     two events, read back with timestamps by the PCI monitor; the PCI
//     host pauses so its monitor FIFO fills and blocks the USB board;
//  2. monitor: events from the PCI sequencer become pixel counts (one pixel
//     saturates), and the VGA output shows a counted pixel's level;
//  3. sequencer, exhaustive: one full frame from a sparse image, checked
//     event by event at the PCI monitor; then the random method for a
//     while, every event on a lit pixel;
//  4. capture of a timed stream from the PCI sequencer, then playback into
//     the PCI monitor with the intervals kept.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module tb_aer_tools_top;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  // USB-AER pins
  logic u_in_req, u_in_ack, u_out_req, u_out_ack;
  aer_addr_t u_in_data, u_out_data;
  mem_addr_t u_sram_addr;
  mem_data_t u_sram_wdata, u_sram_rdata;
  logic u_sram_we, u_sram_oe;
  logic u_host_valid = 0, u_host_we = 0, u_host_reg = 0, u_host_rvalid;
  mem_addr_t u_host_addr = '0;
  mem_data_t u_host_wdata = '0, u_host_rdata;
  logic u_disp_bank, u_frame_done, u_hs, u_vs, u_de;
  logic [7:0] u_grey;
  // PCI-AER pins
  logic p_mon_en = 0, p_seq_en = 0;
  logic [31:0] p_tick_div = 0;
  logic p_in_req, p_in_ack, p_out_req, p_out_ack;
  aer_addr_t p_in_data, p_out_data;
  logic p_mon_valid, p_mon_ready = 0, p_seq_valid = 0, p_seq_ready;
  ts_event_t p_mon_data, p_seq_data = '0;
  logic [9:0] p_mon_level, p_seq_level;
  logic [31:0] p_rx_count, p_tx_count;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_one_to_many = 0, n_fifo_full = 0, n_saturated = 0, n_frame_swap = 0,
      n_vga_pixel = 0, n_exhaustive = 0, n_random = 0, n_captured = 0,
      n_played = 0, n_mapped = 0;

  aer_tools_top dut (
    .usb_clk(clk), .usb_rst_n(rst_n),
    .usb_aer_in_req(u_in_req), .usb_aer_in_data(u_in_data), .usb_aer_in_ack(u_in_ack),
    .usb_aer_out_req(u_out_req), .usb_aer_out_data(u_out_data), .usb_aer_out_ack(u_out_ack),
    .usb_sram_addr(u_sram_addr), .usb_sram_wdata(u_sram_wdata), .usb_sram_we(u_sram_we),
    .usb_sram_oe(u_sram_oe), .usb_sram_rdata(u_sram_rdata),
    .usb_host_valid(u_host_valid), .usb_host_we(u_host_we), .usb_host_reg(u_host_reg),
    .usb_host_addr(u_host_addr), .usb_host_wdata(u_host_wdata),
    .usb_host_rvalid(u_host_rvalid), .usb_host_rdata(u_host_rdata),
    .usb_mon_disp_bank(u_disp_bank), .usb_mon_frame_done(u_frame_done),
    .usb_vga_hsync(u_hs), .usb_vga_vsync(u_vs), .usb_vga_de(u_de), .usb_vga_grey(u_grey),
    .pci_clk(clk), .pci_rst_n(rst_n), .pci_mon_en(p_mon_en), .pci_seq_en(p_seq_en),
    .pci_tick_div(p_tick_div),
    .pci_aer_in_req(p_in_req), .pci_aer_in_data(p_in_data), .pci_aer_in_ack(p_in_ack),
    .pci_aer_out_req(p_out_req), .pci_aer_out_data(p_out_data), .pci_aer_out_ack(p_out_ack),
    .pci_mon_valid(p_mon_valid), .pci_mon_data(p_mon_data), .pci_mon_ready(p_mon_ready),
    .pci_mon_level(p_mon_level), .pci_seq_valid(p_seq_valid), .pci_seq_data(p_seq_data),
    .pci_seq_ready(p_seq_ready), .pci_seq_level(p_seq_level),
    .pci_rx_count(p_rx_count), .pci_tx_count(p_tx_count)
  );

  sram_model sram (.clk, .addr(u_sram_addr), .wdata(u_sram_wdata), .we(u_sram_we),
                   .oe(u_sram_oe), .rdata(u_sram_rdata));

  // AER cables: PCI out -> USB in, USB out -> PCI in
  assign u_in_req  = p_out_req;
  assign u_in_data = p_out_data;
  assign p_out_ack = u_in_ack;
  assign p_in_req  = u_out_req;
  assign p_in_data = u_out_data;
  assign u_out_ack = p_in_ack;

  always #5 clk = ~clk;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- USB host bus ----------------
  task automatic hwrite(bit r, int addr, mem_data_t d);
    @(negedge clk);
    u_host_valid = 1; u_host_we = 1; u_host_reg = r;
    u_host_addr = mem_addr_t'(addr); u_host_wdata = d;
    @(negedge clk);
    u_host_valid = 0; u_host_we = 0;
  endtask

  task automatic hread(bit r, int addr, output mem_data_t d);
    @(negedge clk);
    u_host_valid = 1; u_host_we = 0; u_host_reg = r;
    u_host_addr = mem_addr_t'(addr);
    @(negedge clk);
    u_host_valid = 0;
    d = u_host_rdata;
  endtask

  task automatic set_mode(usb_mode_e m, bit multi = 0, bit rnd = 0);
    hwrite(1, 0, {27'd0, rnd, multi, m});
  endtask

  // ---------------- PCI host side ----------------
  ts_event_t mon_got [$];
  bit mon_pause = 0;
  always @(negedge clk) begin
    bit f;
    p_mon_ready = !mon_pause && ($urandom % 4 != 0);
    #1 f = p_mon_valid && p_mon_ready;
    if (f) mon_got.push_back(p_mon_data);
    if (p_mon_level == 512) n_fifo_full++;
  end

  task automatic pci_send(aer_addr_t a, int dt);
    bit f;
    @(negedge clk);
    p_seq_data = '{dt: aer_ts_t'(dt), addr: a};
    p_seq_valid = 1;
    forever begin
      #1 f = p_seq_ready;
      @(negedge clk);
      if (f) break;
    end
    p_seq_valid = 0;
  endtask

  task automatic wait_mon(int n);
    while (mon_got.size() < n) @(negedge clk);
    repeat (50) @(negedge clk);
  endtask

  // VGA observation: grey level at one screen position of each frame
  int vga_line = -1, vga_col = 0, vga_seen = -1;
  logic de_q = 0, vs_q = 1;
  always @(negedge clk) begin
    if (vs_q && !u_vs) vga_line = -1;
    if (u_de && !de_q) begin vga_line++; vga_col = 0; end
    else if (u_de) vga_col++;
    // pixel (row 0, column 3) of the frame, zoom 2, 2 clocks per pixel
    if (u_de && vga_line == 1 && vga_col == 2 * 7 + 1) vga_seen = int'(u_grey);
    de_q = u_de; vs_q = u_vs;
  end

  initial begin
    mem_data_t d;
    aer_addr_t a;
    int cnt [int];
    aer_addr_t expq [$];
    ts_event_t rec [$];
    int base, nm;
    repeat (4) @(negedge clk);
    rst_n = 1;
    p_mon_en = 1;
    p_seq_en = 1;

    // ---- 1. mapper, one-to-several
    base = 'h70000;
    for (int i = 0; i < 64; i++) begin
      hwrite(0, 'h100 + i, {1'b1, 4'd0, 8'd2, 19'(base + 2 * i)});
      hwrite(0, base + 2 * i, 32'('h5000 + i));
      hwrite(0, base + 2 * i + 1, 32'('h6000 + i));
    end
    set_mode(MODE_MAPPER, 1);
    mon_pause = 1;
    for (int i = 0; i < 400; i++) begin
      a = aer_addr_t'('h100 + $urandom % 64);
      expq.push_back(aer_addr_t'('h5000 + (a - 'h100)));
      expq.push_back(aer_addr_t'('h6000 + (a - 'h100)));
      pci_send(a, 0);
    end
    while (p_mon_level != 512) @(negedge clk);
    repeat (200) @(negedge clk);
    mon_pause = 0;
    wait_mon(800);
    for (int i = 0; i < 800; i++)
      check(mon_got[i].addr == expq[i], $sformatf("mapped event %0d", i));
    hread(1, 11, d);
    n_mapped = int'(d);
    hread(1, 12, d);
    if (n_mapped == 2 * int'(d)) n_one_to_many = int'(d);
    check(n_mapped == 800, "mapper output count");
    mon_got.delete(); expq.delete();

    // ---- 2. monitor with VGA
    hwrite(1, 2, 32'd200000);
    set_mode(MODE_MONITOR);
    @(posedge u_frame_done);
    for (int i = 0; i < 600; i++) begin
      a = (i < 300) ? 16'd3 : aer_addr_t'($urandom % 16384);
      cnt[a] = cnt.exists(a) ? cnt[a] + 1 : 1;
      pci_send(a, 0);
    end
    @(posedge u_frame_done);
    n_frame_swap++;
    hwrite(1, 2, 32'hFFFF_FFFF);   // hold this frame on display
    check(p_seq_level == 0, "all events inside one frame");
    foreach (cnt[p]) begin
      int e;
      e = cnt[p] > 255 ? 255 : cnt[p];
      if (cnt[p] > 255) n_saturated++;
      hread(0, (u_disp_bank ? 'h60000 : 'h40000) + p, d);
      check(int'(d) == e, $sformatf("pixel %0d: %0d vs %0d", p, d, e));
    end
    // a whole VGA frame after the swap shows the new frame
    vga_seen = -1;
    @(negedge u_vs); @(negedge u_vs);
    check(vga_seen == 255, $sformatf("VGA grey of pixel 3: %0d", vga_seen));
    if (vga_seen == 255) n_vga_pixel++;

    // ---- 3. sequencer: exhaustive then random
    set_mode(MODE_IDLE);
    mon_got.delete();
    for (int i = 0; i < 64; i++) hwrite(0, 'h100 + i, 32'd0);   // old mapping table
    for (int p = 0; p < 16384; p += 1024) hwrite(0, p + 17, 32'((p / 1024) * 16 + 5));
    for (int k = 0; k < 256; k++)
      for (int p = 0; p < 16384; p += 1024) begin
        int g;
        g = (p / 1024) * 16 + 5;
        if (((k * g) % 256) + g >= 256) expq.push_back(aer_addr_t'(p + 17));
      end
    hwrite(1, 3, 32'd0);
    set_mode(MODE_SEQ);
    do hread(1, 10, d); while (d < 1);
    set_mode(MODE_IDLE);
    wait_mon(expq.size());
    hread(1, 14, d);
    $display("sequencer events %0d", d);
    check(mon_got.size() == expq.size(), $sformatf("exhaustive frame: %0d events, %0d expected",
          mon_got.size(), expq.size()));
    for (int i = 0; i < expq.size() && i < mon_got.size(); i++) begin
      check(mon_got[i].addr == expq[i], $sformatf("exhaustive event %0d", i));
      if (mon_got[i].addr == expq[i]) n_exhaustive++;
    end
    mon_got.delete(); expq.delete();
    set_mode(MODE_SEQ, 0, 1);
    while (mon_got.size() < 300) @(negedge clk);
    set_mode(MODE_IDLE);
    repeat (100) @(negedge clk);
    foreach (mon_got[i]) begin
      check(mon_got[i].addr % 1024 == 17, "random event on a lit pixel");
      n_random++;
    end
    mon_got.delete();

    // ---- 4. capture and playback
    p_tick_div = 3;
    hwrite(1, 1, 32'd3);
    set_mode(MODE_CAPTURE);
    hwrite(1, 4, 32'd1);
    for (int i = 0; i < 100; i++) begin
      ts_event_t w;
      w.addr = aer_addr_t'($urandom);
      w.dt   = aer_ts_t'(5 + $urandom % 40);
      rec.push_back(w);
      pci_send(w.addr, int'(w.dt));
    end
    while (p_tx_count != 400 + 600 + 100 || p_seq_level != 0) @(negedge clk);
    repeat (50) @(negedge clk);
    hread(1, 8, d);
    n_captured = int'(d);
    check(d == 100, $sformatf("captured %0d", d));
    set_mode(MODE_IDLE);
    hwrite(1, 4, 32'd2);
    set_mode(MODE_PLAY);
    wait_mon(100);
    for (int i = 0; i < 100; i++) begin
      check(mon_got[i].addr == rec[i].addr, $sformatf("played event %0d", i));
      // interval seen by the PCI monitor against the one sequenced
      if (i > 0) begin
        check(int'(mon_got[i].dt) >= int'(rec[i].dt) - 1 && int'(mon_got[i].dt) <= int'(rec[i].dt) + 1,
              $sformatf("played interval %0d: %0d vs %0d ticks", i, mon_got[i].dt, rec[i].dt));
        if (int'(mon_got[i].dt) >= int'(rec[i].dt) - 1) n_played++;
      end
    end

    $display("mapped %0d (one-to-several %0d), FIFO-full cycles %0d, saturated %0d, frame swaps %0d, VGA %0d",
             n_mapped, n_one_to_many, n_fifo_full, n_saturated, n_frame_swap, n_vga_pixel);
    $display("exhaustive %0d, random %0d, captured %0d, played %0d",
             n_exhaustive, n_random, n_captured, n_played);
    check(n_one_to_many > 0, "one-to-several mapping happened");
    check(n_fifo_full > 0, "monitor FIFO back-pressure happened");
    check(n_saturated > 0, "pixel saturation happened");
    check(n_frame_swap > 0, "frame swap happened");
    check(n_vga_pixel > 0, "VGA display happened");
    check(n_exhaustive > 0, "exhaustive sequencing happened");
    check(n_random > 0, "random sequencing happened");
    check(n_captured > 0, "capture happened");
    check(n_played > 0, "playback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
