// tb_event_store: records timestamped words into memory and plays them back.
//
// With a 64-word store on a memory port that withholds its grant at random:
// 40 random words are recorded and checked word by word in memory at BASE
// onwards; recording continues until the store reports full at 64 words
// and refuses more; playback returns all 64 words in order under random
// back-pressure and then reports done; looped playback returns 150 words
// that wrap around the recording.
module tb_event_store;
  import aer_pkg::*;
  localparam int DEPTH = 64;
  localparam mem_addr_t BASE = 19'd100;
  logic clk = 0, rst_n = 0;
  logic rec_start = 0, rec_en = 0, play_start = 0, play_en = 0, loop = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  ts_event_t in_event = '0, out_event;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic [19:0] rec_count;
  logic full, done;
  int checks = 0, failures = 0;
  ts_event_t words [$];

  event_store #(.DEPTH(DEPTH), .BASE(BASE)) dut (.*);
  mem_port_model #(.AW(8), .STALL(4)) mem (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // offer one word; returns when the store took it
  task automatic record(ts_event_t w);
    bit f;
    @(negedge clk);
    in_valid = 1; in_event = w;
    forever begin
      #1 f = in_ready;
      @(negedge clk);
      if (f) break;
    end
    in_valid = 0;
  endtask

  task automatic take(output ts_event_t w);
    bit f;
    forever begin
      @(negedge clk);
      out_ready = ($urandom % 3) != 0;
      #1 f = out_valid && out_ready;
      w = out_event;
      if (f) break;
    end
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    ts_event_t w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); rec_en = 1; rec_start = 1;
    @(negedge clk); rec_start = 0;
    for (int i = 0; i < 40; i++) begin
      w = ts_event_t'($urandom);
      words.push_back(w);
      record(w);
    end
    repeat (3) @(negedge clk);
    check(rec_count == 40, "rec_count after 40");
    for (int i = 0; i < 40; i++)
      check(mem.mem[BASE + i] == words[i], $sformatf("memory word %0d", i));
    for (int i = 40; i < DEPTH; i++) begin
      w = ts_event_t'($urandom);
      words.push_back(w);
      record(w);
    end
    repeat (2) @(negedge clk);
    check(full && rec_count == DEPTH, "full at DEPTH");
    in_valid = 1;
    repeat (10) begin
      #1 check(!in_ready, "refuses when full");
      @(negedge clk);
    end
    in_valid = 0;
    // playback
    rec_en = 0; play_en = 1; play_start = 1;
    @(negedge clk); play_start = 0;
    for (int i = 0; i < DEPTH; i++) begin
      take(w);
      check(w == words[i], $sformatf("played word %0d", i));
    end
    repeat (5) @(negedge clk);
    check(done && !out_valid, "done after last word");
    // looped playback
    loop = 1; play_start = 1;
    @(negedge clk); play_start = 0;
    for (int i = 0; i < 150; i++) begin
      take(w);
      check(w == words[i % DEPTH], $sformatf("looped word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
