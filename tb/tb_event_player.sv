// tb_event_player: checks that recorded inter-event intervals are replayed.
//
// A queue of {dt, addr} words is offered to the player. Phase 1: the word
// is always available, the output is never blocked, the time base ticks
// every clock and then every other clock, and dt >= 1; each event must
// leave exactly when dt ticks have passed since the previous one left
// (ticks counted from the clock the previous word was consumed, inclusive,
// to this one, exclusive). Phase 2: random back-pressure, random gaps in
// the input and dt from 0; each event may leave no earlier than dt ticks.
// In both phases the addresses must leave in order.
module tb_event_player;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, tick = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  ts_event_t in_event = '0;
  aer_addr_t out_addr;
  int checks = 0, failures = 0;
  int cyc = 0, last_emit = 1;
  bit tick_hist [int];
  aer_addr_t expq [$];
  int nin = 0, nout = 0, phase = 1;
  localparam int N = 300;

  event_player dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ts_event_t new_word();
    ts_event_t w;
    w.addr = aer_addr_t'($urandom);
    w.dt   = aer_ts_t'((phase == 1) ? 1 + $urandom % 30 : $urandom % 20);
    return w;
  endfunction

  bit in_fire = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_fire) begin
        in_valid = 0;
        if (nin == N) phase = 2;
      end
      cyc++;
      if (cyc == 1) enable = 1;
      tick = (nin < N / 2) ? 1'b1 : (cyc % 2 == 0);
      out_ready = (phase == 1) ? 1'b1 : ($urandom % 3 != 0);
      if (enable && !in_valid && nin < 2 * N && (phase == 1 || $urandom % 4 == 0)) begin
        in_valid = 1;
        in_event = new_word();
      end
      #1;
      tick_hist[cyc] = tick;
      in_fire = in_valid && in_ready;
      if (in_fire) begin
        int n;
        n = 0;
        for (int c = last_emit; c < cyc; c++) if (tick_hist[c]) n++;
        checks++;
        if ((phase == 1 && n != int'(in_event.dt)) || n < int'(in_event.dt)) begin
          failures++;
          $display("word %0d (phase %0d): left after %0d ticks, dt=%0d",
                   nin, phase, n, in_event.dt);
        end
        expq.push_back(in_event.addr);
        last_emit = cyc;
        nin++;
      end
      if (out_valid && out_ready) begin
        aer_addr_t e;
        e = expq.pop_front();
        checks++;
        if (out_addr !== e) begin
          failures++;
          $display("event %0d: got %h expected %h", nout, out_addr, e);
        end
        nout++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (nout == 2 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
