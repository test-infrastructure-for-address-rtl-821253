// tb_frame_monitor: checks event counting per pixel over frame periods.
//
// A 16-pixel, 4-bit (saturating at 15) monitor with a 600-clock frame
// period receives random events; some frames hold a burst of 25 events on
// one pixel to force saturation. Each accepted event is assigned to the
// frame being counted at that moment (the monitor's frame counter). When a
// frame completes, the displayed bank in the memory model must hold, for
// every pixel, the number of that frame's events on it, capped at 15. The
// memory withholds its grant at random.
module tb_frame_monitor;
  import aer_pkg::*;
  localparam int PIX_W = 4, CNT_W = 4, NPIX = 16, NFRAMES = 6;
  localparam mem_addr_t B0 = 19'h40, B1 = 19'h80;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [31:0] frame_cycles = 600;
  logic in_valid = 0, in_ready;
  aer_addr_t in_addr = '0;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic disp_bank, frame_done;
  logic [31:0] frame_count, sat_count;
  int checks = 0, failures = 0;
  int counts [int][NPIX];
  int nsat = 0;

  frame_monitor #(.PIX_W(PIX_W), .CNT_W(CNT_W), .BANK0(B0), .BANK1(B1)) dut (.*);
  mem_port_model #(.AW(8), .STALL(6)) mem (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit fi = 0;
  int burst = 0;
  always @(negedge clk) begin
    if (enable) begin
      if (fi) in_valid = 0;
      if (!in_valid && $urandom % 3 == 0) begin
        in_valid = 1;
        if (burst > 0) begin burst--; in_addr = 16'h0005; end
        else in_addr = aer_addr_t'($urandom);   // upper bits ignored
        if (burst == 0 && $urandom % 150 == 0) burst = 25;
      end
      #1;
      fi = in_valid && in_ready;
      if (fi) begin
        int f;
        f = int'(frame_count);
        if (!counts.exists(f)) foreach (counts[f][p]) counts[f][p] = 0;
        counts[f][in_addr[PIX_W-1:0]]++;
      end
      if (frame_done) begin
        int f;
        f = int'(frame_count) - 1;
        for (int p = 0; p < NPIX; p++) begin
          int e, got;
          e = counts.exists(f) ? counts[f][p] : 0;
          if (e > 15) begin e = 15; nsat++; end
          got = int'(mem.mem[(disp_bank ? B1 : B0) + p]);
          checks++;
          if (got != e) begin
            failures++;
            $display("frame %0d pixel %0d: %0d expected %0d", f, p, got, e);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // memory starts with garbage: the monitor must clear before counting
    for (int i = 0; i < 256; i++) mem.mem[i] = $urandom;
    @(negedge clk); enable = 1;
    wait (frame_count == NFRAMES);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (nsat == 0 || sat_count == 0) begin failures++; $display("saturation never happened"); end
    $display("frames %0d, saturated pixels %0d", frame_count, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
