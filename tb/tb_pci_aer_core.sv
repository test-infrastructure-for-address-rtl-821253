// tb_pci_aer_core: monitoring and sequencing through the PCI-AER logic.
//
// Monitor: an emitter model sends 200 random addresses at random gaps; the
// host side drains the monitor FIFO with random pauses, after a long first
// pause that fills a 16-word FIFO so the input port must block the emitter.
// Every word must carry the sent address in order; once the backlog has
// drained, with one tick per clock, dt must equal the clocks between the
// input port's acknowledges within two clocks. Sequencer: 100 {dt, addr} words are pushed; the
// receiver model must see the addresses in order, and the clocks between
// consecutive requests must be at least dt ticks (tick every other clock).
module tb_pci_aer_core;
  import aer_pkg::*;
  localparam int FD = 16;
  logic clk = 0, rst_n = 0, mon_en = 0, seq_en = 0;
  logic [31:0] tick_div = 0;
  logic aer_in_req, aer_in_ack, aer_out_req, aer_out_ack;
  aer_addr_t aer_in_data, aer_out_data;
  logic mon_valid, mon_ready = 0, seq_valid = 0, seq_ready;
  ts_event_t mon_data, seq_data = '0;
  logic [$clog2(FD):0] mon_level, seq_level;
  logic [31:0] rx_count, tx_count;
  int checks = 0, failures = 0;

  pci_aer_core #(.FIFO_DEPTH(FD)) dut (.*);
  aer_emitter_model #(.MAX_GAP(12)) em (.clk, .req(aer_in_req), .data(aer_in_data), .ack(aer_in_ack));
  aer_receiver_model #(.MAX_DELAY(3)) rc (.clk, .req(aer_out_req), .data(aer_out_data), .ack(aer_out_ack));
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // acknowledge times of the input port
  longint ack_t [$];
  logic ack_q = 0;
  always @(posedge clk) begin
    if (aer_in_ack && !ack_q) ack_t.push_back($time / 10);
    ack_q <= aer_in_ack;
  end
  // request times of the output port
  longint req_t [$];
  logic req_q = 0;
  always @(posedge clk) begin
    if (aer_out_req && !req_q) req_t.push_back($time / 10);
    req_q <= aer_out_req;
  end

  aer_addr_t sent_addr [$];
  int blocked = 0;
  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); mon_en = 1;
    for (int i = 0; i < 200; i++) begin
      aer_addr_t a = aer_addr_t'($urandom);
      sent_addr.push_back(a);
      em.send(a);
    end
    // drain: a long pause first fills the FIFO
    n = 0;
    repeat (2000) @(negedge clk);
    check(mon_level == FD, "monitor FIFO full during host pause");
    check(em.sent < 200 && em.q.size() > 0, "emitter blocked while FIFO full");
    if (mon_level == FD) blocked++;
    while (n < 200) begin
      bit f;
      @(negedge clk);
      mon_ready = ($urandom % 4) != 0;
      #1 f = mon_valid && mon_ready;
      if (f) begin
        check(mon_data.addr == sent_addr[n], $sformatf("monitor addr %0d", n));
        if (n >= FD + 4) begin
          longint d;
          d = ack_t[n] - ack_t[n - 1];
          check(int'(mon_data.dt) >= d - 2 && int'(mon_data.dt) <= d + 2,
                $sformatf("monitor dt %0d vs %0d clocks", mon_data.dt, d));
        end
        n++;
      end
    end
    @(negedge clk); mon_ready = 0;
    check(rx_count == 200, "rx_count");

    // sequencer
    tick_div = 1;
    seq_en = 1;
    for (int i = 0; i < 100; i++) begin
      bit f;
      ts_event_t w;
      w.addr = aer_addr_t'($urandom);
      w.dt   = aer_ts_t'($urandom % 40);
      seq_q.push_back(w);
      seq_data = w; seq_valid = 1;
      forever begin
        #1 f = seq_ready;
        @(negedge clk);
        if (f) break;
      end
      seq_valid = 0;
    end
    wait (rc.got.size() == 100);
    repeat (20) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      check(rc.got[i] == seq_q[i].addr, $sformatf("sequenced addr %0d", i));
      if (i > 0) check(req_t[i] - req_t[i - 1] >= 2 * longint'(seq_q[i].dt) - 2,
                       $sformatf("sequenced interval %0d: %0d clocks, dt %0d",
                                 i, req_t[i] - req_t[i - 1], seq_q[i].dt));
    end
    check(tx_count == 100, "tx_count");
    check(blocked > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  ts_event_t seq_q [$];
endmodule
