// tb_event_timestamper: checks the timing field of monitored events.
//
// Events are offered at random gaps while the time base ticks every clock,
// then every third clock; one gap is longer than 65535 ticks. The output is
// taken with random back-pressure. For each event the expected dt is the
// number of tick cycles from the clock the previous event was accepted
// (inclusive) to the clock this one was accepted (exclusive), worked out
// from a record of every clock's tick, saturated at 65535.
module tb_event_timestamper;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, tick = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  aer_addr_t in_addr = '0;
  ts_event_t out_event;
  int checks = 0, failures = 0;
  int cyc = 0, last_acc = -1;
  bit tick_hist [int];
  ts_event_t expq [$];
  int tick_mode = 1;
  int nout = 0;
  localparam int N = 400;

  event_timestamper dut (.*);
  always #5 clk = ~clk;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus changes at the falling edge; one time unit later the
  // handshakes the coming rising edge will see are recorded.
  int gap = 0, sent = 0;
  bit in_fire = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_fire) begin
        in_valid = 0;
        gap = (sent == N / 2) ? 200000 : $urandom % 20;
        if (sent == N / 4) tick_mode = 3;
      end
      cyc++;
      tick = (cyc % tick_mode) == 0;
      if (cyc == 1) begin enable = 1; last_acc = 1; end
      out_ready = ($urandom % 3) != 0;
      if (enable && !in_valid && sent < N) begin
        if (gap > 0) gap--;
        else begin in_valid = 1; in_addr = aer_addr_t'($urandom); end
      end
      #1;
      tick_hist[cyc] = tick;
      in_fire = in_valid && in_ready;
      if (in_fire) begin
        int n;
        n = 0;
        for (int c = last_acc; c < cyc; c++) if (tick_hist[c]) n++;
        if (n > 65535) n = 65535;
        expq.push_back('{dt: aer_ts_t'(n), addr: in_addr});
        last_acc = cyc;
        sent++;
      end
      if (out_valid && out_ready) begin
        ts_event_t e;
        e = expq.pop_front();
        checks++;
        if (out_event !== e) begin
          failures++;
          $display("event %0d: got dt=%0d addr=%h expected dt=%0d addr=%h",
                   nout, out_event.dt, out_event.addr, e.dt, e.addr);
        end
        nout++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (nout == N);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
