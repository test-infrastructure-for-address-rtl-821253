// tb_aer_rx: drives the AER receiver port from an emitter model.
//
// The emitter sends 300 random addresses with the four-phase handshake,
// sometimes waiting a few clocks between events. The downstream side takes
// events with random back-pressure. Checks: every address arrives once and
// in order, ack never rises without req, the handshake count matches, and
// with an emitter that answers at once and no back-pressure one event
// takes at most eight clocks.
module tb_aer_rx;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  logic aer_req = 0, aer_ack;
  aer_addr_t aer_data = '0;
  logic ev_valid, ev_ready;
  aer_addr_t ev_addr;
  logic [31:0] ev_count;
  int checks = 0, failures = 0;
  aer_addr_t sent [$];
  int nrecv = 0;
  bit fast = 0;
  localparam int N = 300;

  aer_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // downstream
  always @(posedge clk) begin
    if (rst_n && ev_valid && ev_ready) begin
      aer_addr_t exp;
      exp = sent.pop_front();
      checks++;
      if (ev_addr !== exp) begin
        failures++;
        $display("event %0d: got %h expected %h", nrecv, ev_addr, exp);
      end
      nrecv++;
    end
  end
  always @(negedge clk) ev_ready <= fast ? 1'b1 : ($urandom % 12 == 0);

  // protocol rule: ack only while or after a request
  logic prev_ack = 0;
  always @(negedge clk) begin
    if (rst_n && aer_ack && !prev_ack && !aer_req) begin
      failures++; $display("ack rose without request");
    end
    prev_ack <= aer_ack;
  end

  task automatic send(aer_addr_t a);
    aer_data = a;
    sent.push_back(a);
    @(posedge clk) aer_req = 1;
    wait (aer_ack);
    @(posedge clk) aer_req = 0;
    wait (!aer_ack);
  endtask

  initial begin
    longint t0, t1;
    ev_ready = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      send(aer_addr_t'($urandom));
      repeat ($urandom % 4) @(posedge clk);
    end
    // rate: back-to-back events with no back-pressure
    wait (nrecv == N);
    fast = 1;
    @(posedge clk);
    t0 = $time;
    for (int i = 0; i < 50; i++) send(aer_addr_t'(i));
    t1 = $time;
    wait (nrecv == N + 50);
    checks++;
    if ((t1 - t0) / 10 > 50 * 8) begin
      failures++;
      $display("rate: %0d clocks for 50 events", (t1 - t0) / 10);
    end
    $display("50 events in %0d clocks", (t1 - t0) / 10);
    checks++;
    if (ev_count != N + 50) begin failures++; $display("ev_count %0d", ev_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
