// tb_aer_tx: drives the AER transmitter port into a receiver model.
//
// 300 random addresses are offered on the stream with random gaps. The
// receiver model acknowledges each request after a random delay of 0 to 5
// clocks and drops ack after req falls. Checks: the addresses arrive in
// order, data are stable while req is high, req never rises while ack is
// still high, the event count matches, and with an immediate receiver an
// event takes at most eight clocks.
module tb_aer_tx;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_ready;
  aer_addr_t ev_addr = '0;
  logic aer_req, aer_ack = 0;
  aer_addr_t aer_data;
  logic [31:0] ev_count;
  int checks = 0, failures = 0;
  aer_addr_t sent [$];
  int nrecv = 0;
  bit fast = 0;
  localparam int N = 300;

  aer_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver model
  initial begin
    forever begin
      do @(negedge clk); while (!aer_req);
      checks++;
      if (aer_data !== sent[nrecv]) begin
        failures++;
        $display("event %0d: got %h expected %h", nrecv, aer_data, sent[nrecv]);
      end
      nrecv++;
      if (!fast) repeat ($urandom % 6) @(negedge clk);
      aer_ack = 1;
      do @(negedge clk); while (aer_req);
      if (!fast) repeat ($urandom % 3) @(negedge clk);
      aer_ack = 0;
    end
  end

  logic prev_req = 0, prev_ack = 0;
  aer_addr_t prev_data = '0;
  always @(negedge clk) begin
    if (rst_n && aer_req && prev_req && aer_data != prev_data) begin
      failures++; $display("data changed during request");
    end
    if (rst_n && aer_req && !prev_req && prev_ack) begin
      failures++; $display("request while ack high");
    end
    prev_req  = aer_req;
    prev_ack  = aer_ack;
    prev_data = aer_data;
  end

  task automatic put(aer_addr_t a);
    bit r;
    @(negedge clk);
    ev_addr  = a;
    ev_valid = 1;
    sent.push_back(a);
    forever begin
      r = ev_ready;
      @(posedge clk);
      if (r) break;
      @(negedge clk);
    end
    @(negedge clk);
    ev_valid = 0;
  endtask

  initial begin
    longint t0, t1;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      put(aer_addr_t'($urandom));
      repeat ($urandom % 3) @(negedge clk);
    end
    wait (nrecv == N);
    fast = 1;
    do @(posedge clk); while (!(ev_ready && !aer_ack));
    t0 = $time;
    // streaming producer: valid stays high, next address after each take
    for (int i = 0; i < 50; i++) begin
      bit r;
      ev_addr  = aer_addr_t'(i * 7);
      ev_valid = 1;
      sent.push_back(ev_addr);
      forever begin
        r = ev_ready;
        @(posedge clk);
        if (r) break;
        @(negedge clk);
      end
      @(negedge clk);
    end
    ev_valid = 0;
    do @(posedge clk); while (!(ev_ready && nrecv == N + 50));
    t1 = $time;
    $display("50 events in %0d clocks", (t1 - t0) / 10);
    checks++;
    if ((t1 - t0) / 10 > 50 * 8) begin failures++; $display("too slow"); end
    checks++;
    if (ev_count != N + 50) begin failures++; $display("ev_count %0d", ev_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
