// tb_frame_sequencer: checks frame to AER conversion by both methods.
//
// An 8-pixel, 16-level frame of random grey levels (pixel 2 forced to 0,
// pixel 5 to 15) is placed in the memory model. Exhaustive method: the
// output must be exactly, for slice k = 0..15 and pixel p = 0..7 in
// order, pixel p whenever the low 4 bits of k*g(p) plus g(p) reach 16; so
// over each frame every pixel emits exactly g(p) events. Each slice must
// last at least slice_cycles clocks, so a frame at least 16 of them.
// Random method: over 60 frames each pixel must emit about 60*g(p) events
// (within a quarter plus 12), and a pixel at level 0 none. The output sees
// random back-pressure and the memory withholds its grant at random.
module tb_frame_sequencer;
  import aer_pkg::*;
  localparam int PIX_W = 3, LVL_W = 4, NPIX = 8, NLEV = 16;
  localparam mem_addr_t FB = 19'h20;
  logic clk = 0, rst_n = 0, enable = 0, method = 0;
  logic [31:0] slice_cycles = 30;
  logic out_valid, out_ready = 0;
  aer_addr_t out_addr;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic [31:0] frame_count, event_count;
  int checks = 0, failures = 0;
  int g [NPIX];
  aer_addr_t expq [$];
  int hist [NPIX];
  int nout = 0;

  frame_sequencer #(.PIX_W(PIX_W), .LVL_W(LVL_W), .FRAME_BASE(FB)) dut (.*);
  mem_port_model #(.AW(8), .STALL(5)) mem (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    out_ready = ($urandom % 4) != 0;
    #1;
    if (enable && out_valid && out_ready) begin
      hist[out_addr[PIX_W-1:0]]++;
      if (!method) begin
        aer_addr_t e;
        if (expq.size() == 0) begin
          for (int f = 0; f < 1; f++)
            for (int k = 0; k < NLEV; k++)
              for (int p = 0; p < NPIX; p++)
                if (((k * g[p]) % NLEV) + g[p] >= NLEV) expq.push_back(aer_addr_t'(p));
        end
        e = expq.pop_front();
        checks++;
        if (out_addr !== e) begin
          failures++; $display("event %0d: got %0d expected %0d", nout, out_addr, e);
        end
      end
      nout++;
    end
  end

  // frame period
  longint last_frame_t = 0;
  always @(posedge clk) begin
    if (enable && frame_count != $past(frame_count) && last_frame_t != 0) begin
      checks++;
      if (($time - last_frame_t) / 10 < NLEV * slice_cycles) begin
        failures++; $display("frame shorter than %0d slices", NLEV);
      end
    end
    if (enable && frame_count != $past(frame_count)) last_frame_t = $time;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPIX; p++) begin
      g[p] = $urandom % NLEV;
      if (p == 2) g[p] = 0;
      if (p == 5) g[p] = NLEV - 1;
      mem.mem[FB + p] = {$urandom, LVL_W'(g[p])} ;
      mem.mem[FB + p][31:LVL_W] = '0;
    end
    // exhaustive
    @(negedge clk); method = 0; enable = 1;
    wait (frame_count == 5);
    @(negedge clk); enable = 0;
    $display("exhaustive: %0d events in 5 frames", nout);
    for (int p = 0; p < NPIX; p++) begin
      checks++;
      if (hist[p] < 5 * g[p] || hist[p] > 5 * g[p] + 1) begin
        failures++; $display("pixel %0d: %0d events, grey %0d", p, hist[p], g[p]);
      end
      hist[p] = 0;
    end
    // random
    repeat (3) @(negedge clk);
    method = 1; enable = 1; nout = 0;
    wait (frame_count == 60);
    @(negedge clk); enable = 0;
    $display("random: %0d events in 60 frames", nout);
    for (int p = 0; p < NPIX; p++) begin
      int e;
      e = 60 * g[p];
      checks++;
      if (hist[p] < e - e / 4 - 12 || hist[p] > e + e / 4 + 12 || (g[p] == 0 && hist[p] != 0)) begin
        failures++; $display("random pixel %0d: %0d events, expected about %0d", p, hist[p], e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
