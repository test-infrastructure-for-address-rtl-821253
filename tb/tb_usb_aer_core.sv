// tb_usb_aer_core: runs every function of the USB-AER logic through its
// pins: AER emitter and receiver models on the two ports, an SRAM model on
// the memory pins and a host driving the microcontroller bus.
//
// Reduced frame size (8 x 8 pixels, 16 levels). In order:
//  * IDLE: host writes and reads back SRAM words and registers;
//  * MAPPER one-to-one, then one-to-several, with tables written by the
//    host: the receiver must see exactly the mapped addresses;
//  * MONITOR: events sent within one frame period must appear as per-pixel
//    counts in the displayed bank, read by the host after the swap;
//  * SEQ exhaustive: one frame must give exactly the exhaustive sequence;
//  * CAPTURE: 60 events with random gaps are recorded as {dt, addr} words;
//  * PLAY: the recording is played to the receiver in order with request
//    intervals of at least dt ticks.
module tb_usb_aer_core;
  import aer_pkg::*;
  localparam int PIX_W = 6, LVL_W = 4, NPIX = 64, NLEV = 16;
  logic clk = 0, rst_n = 0;
  logic aer_in_req, aer_in_ack, aer_out_req, aer_out_ack;
  aer_addr_t aer_in_data, aer_out_data;
  mem_addr_t sram_addr;
  mem_data_t sram_wdata, sram_rdata;
  logic sram_we, sram_oe;
  logic host_valid = 0, host_we = 0, host_reg = 0, host_rvalid;
  mem_addr_t host_addr = '0;
  mem_data_t host_wdata = '0, host_rdata;
  logic mon_disp_bank, mon_frame_done;
  logic vga_hsync, vga_vsync, vga_de;
  logic [LVL_W-1:0] vga_grey;
  int checks = 0, failures = 0;

  usb_aer_core #(.REC_DEPTH(1024), .PIX_W(PIX_W), .LVL_W(LVL_W)) dut (.*);
  sram_model #(.AW(19)) sram (.clk, .addr(sram_addr), .wdata(sram_wdata),
                              .we(sram_we), .oe(sram_oe), .rdata(sram_rdata));
  aer_emitter_model #(.MAX_GAP(6)) em (.clk, .req(aer_in_req), .data(aer_in_data), .ack(aer_in_ack));
  aer_receiver_model #(.MAX_DELAY(2)) rc (.clk, .req(aer_out_req), .data(aer_out_data), .ack(aer_out_ack));
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic hwrite(bit reg_space, int addr, mem_data_t d);
    @(negedge clk);
    host_valid = 1; host_we = 1; host_reg = reg_space;
    host_addr = mem_addr_t'(addr); host_wdata = d;
    @(negedge clk);
    host_valid = 0; host_we = 0;
  endtask

  task automatic hread(bit reg_space, int addr, output mem_data_t d);
    @(negedge clk);
    host_valid = 1; host_we = 0; host_reg = reg_space;
    host_addr = mem_addr_t'(addr);
    @(negedge clk);
    host_valid = 0;
    d = host_rdata;
    if (!host_rvalid) begin failures++; $display("no rvalid"); end
  endtask

  task automatic set_mode(usb_mode_e m, bit multi = 0, bit rnd = 0, bit lp = 0);
    hwrite(1, 0, {26'd0, lp, rnd, multi, m});
  endtask

  task automatic wait_rx(int n);
    while (rc.got.size() < n) @(negedge clk);
    repeat (30) @(negedge clk);
  endtask

  // request times of the output port
  longint req_t [$];
  logic req_q = 0;
  always @(posedge clk) begin
    if (aer_out_req && !req_q) req_t.push_back($time / 10);
    req_q <= aer_out_req;
  end

  initial begin
    mem_data_t d;
    aer_addr_t a;
    int base, cnt [NPIX], exp_n;
    aer_addr_t expq [$];
    mem_data_t rec [$];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- IDLE: host memory and register access
    for (int i = 0; i < 8; i++) hwrite(0, 'h7000 + i, 32'hA5000000 + i);
    for (int i = 0; i < 8; i++) begin
      hread(0, 'h7000 + i, d);
      check(d == 32'hA5000000 + i, "host SRAM readback");
    end
    hwrite(1, 3, 32'd5);
    hread(1, 3, d);
    check(d == 5, "register readback");

    // ---- MAPPER one-to-one: address a -> a ^ 16'h1234 for a < 32
    for (int i = 0; i < 32; i++) hwrite(0, i, {1'b1, 15'd0, 16'(i) ^ 16'h1234});
    set_mode(MODE_MAPPER);
    for (int i = 0; i < 40; i++) begin
      a = aer_addr_t'($urandom % 32);
      em.send(a);
      expq.push_back(a ^ 16'h1234);
    end
    wait_rx(40);
    for (int i = 0; i < 40; i++) check(rc.got[i] == expq[i], $sformatf("1:1 map %0d", i));
    rc.got.delete(); expq.delete();

    // ---- MAPPER one-to-several: address a -> (a % 4) + 1 events a*16+k
    set_mode(MODE_IDLE);
    base = 'h10000;
    for (int i = 0; i < 32; i++) begin
      hwrite(0, i, {1'b1, 4'd0, 8'(i % 4 + 1), 19'(base)});
      for (int k = 0; k <= i % 4; k++) hwrite(0, base + k, 32'(i * 16 + k));
      base += i % 4 + 1;
    end
    set_mode(MODE_MAPPER, 1);
    exp_n = 0;
    for (int i = 0; i < 30; i++) begin
      a = aer_addr_t'($urandom % 32);
      em.send(a);
      for (int k = 0; k <= a % 4; k++) expq.push_back(a * 16 + k);
    end
    wait_rx(expq.size());
    check(rc.got.size() == expq.size(), "1:N event count");
    for (int i = 0; i < expq.size(); i++) check(rc.got[i] == expq[i], $sformatf("1:N map %0d", i));
    rc.got.delete(); expq.delete();

    // ---- MONITOR
    hwrite(1, 2, 32'd6000);
    set_mode(MODE_MONITOR);
    @(posedge mon_frame_done);
    foreach (cnt[p]) cnt[p] = 0;
    for (int i = 0; i < 150; i++) begin
      a = aer_addr_t'($urandom % NPIX);
      if (i < 20) a = 7;            // pixel 7 saturates at 15
      cnt[a]++;
      em.send(a);
    end
    @(posedge mon_frame_done);
    check(em.q.size() == 0, "all events inside the frame");
    for (int p = 0; p < NPIX; p++) begin
      hread(0, (mon_disp_bank ? 'h60000 : 'h40000) + p, d);
      check(int'(d) == (cnt[p] > 15 ? 15 : cnt[p]), $sformatf("monitor pixel %0d: %0d vs %0d", p, d, cnt[p]));
    end
    hread(1, 9, d);
    check(d >= 2, "frames counted");

    // ---- SEQ exhaustive
    set_mode(MODE_IDLE);
    for (int p = 0; p < NPIX; p++) begin
      cnt[p] = (p % 5 == 0) ? $urandom % NLEV : 0;
      hwrite(0, p, 32'(cnt[p]));
    end
    for (int k = 0; k < NLEV; k++)
      for (int p = 0; p < NPIX; p++)
        if (((k * cnt[p]) % NLEV) + cnt[p] >= NLEV) expq.push_back(aer_addr_t'(p));
    hwrite(1, 3, 32'd200);
    rc.got.delete();
    set_mode(MODE_SEQ);
    do hread(1, 10, d); while (d < 1);
    set_mode(MODE_IDLE);
    repeat (40) @(negedge clk);
    check(rc.got.size() >= expq.size(), "sequencer events in one frame");
    for (int i = 0; i < expq.size(); i++) check(rc.got[i] == expq[i], $sformatf("sequence event %0d", i));
    rc.got.delete(); expq.delete();

    // ---- CAPTURE
    hwrite(1, 1, 32'd0);          // one tick per clock
    set_mode(MODE_CAPTURE);
    hwrite(1, 4, 32'd1);          // clear recording
    for (int i = 0; i < 60; i++) begin
      a = aer_addr_t'($urandom);
      expq.push_back(a);
      em.send(a);
    end
    while (em.q.size() != 0 || em.sent < 60 + 40 + 30 + 150) @(negedge clk);
    repeat (20) @(negedge clk);
    hread(1, 8, d);
    check(d == 60, $sformatf("recorded %0d events", d));
    for (int i = 0; i < 60; i++) begin
      hread(0, i, d);
      rec.push_back(d);
      check(d[15:0] == expq[i], $sformatf("recorded word %0d", i));
      if (i > 0) check(d[31:16] >= 6, "recorded interval covers the handshake");
    end

    // ---- PLAY
    set_mode(MODE_IDLE);
    hwrite(1, 4, 32'd2);          // rewind
    set_mode(MODE_PLAY);
    wait_rx(60);
    hread(1, 7, d);
    check(d[0] == 1, "playback done");
    for (int i = 0; i < 60; i++) begin
      check(rc.got[i] == expq[i], $sformatf("played event %0d: %h vs %h", i, rc.got[i], expq[i]));
      if (i > 0) check(req_t[req_t.size() - 60 + i] - req_t[req_t.size() - 61 + i] >= longint'(rec[i][31:16]),
                       $sformatf("played interval %0d", i));
    end
    hread(1, 5, d);
    check(d == 60 + 40 + 30 + 150, $sformatf("rx count %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
