// tb_vga_frame_out: checks the VGA timing and the displayed image.
//
// An 8 x 8 frame magnified twice is shown from a memory model holding a
// different random image in each bank; the displayed bank changes between
// the two frames checked. Checks: hsync every 800 pixels (1600 clocks at
// two clocks per pixel) and low for 96 pixels, vsync every 525 lines and
// low for 2 lines, 640 active pixels on each of 480 active lines, and every
// active pixel equal to the grey level of its frame pixel in the displayed
// bank inside the 16 x 16 corner and black elsewhere.
module tb_vga_frame_out;
  import aer_pkg::*;
  localparam int COL_W = 3, ROW_W = 3, ZOOM = 1, PIX_DIV = 2;
  localparam mem_addr_t B0 = 19'h40, B1 = 19'h80;
  logic clk = 0, rst_n = 0, enable = 0, disp_bank = 0;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic vga_hsync, vga_vsync, vga_de;
  logic [7:0] vga_grey;
  int checks = 0, failures = 0, pix_fail = 0;

  vga_frame_out #(.PIX_DIV(PIX_DIV), .COL_W(COL_W), .ROW_W(ROW_W), .ZOOM(ZOOM),
                  .BANK0(B0), .BANK1(B1)) dut (.*);
  mem_port_model #(.AW(8)) mem (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // edge bookkeeping in clocks
  longint clk_n = 0, hs_fall = -1, vs_fall = -1, de_rise = -1;
  int line = -1, frames = 0, de_len = 0, lines_de = 0;
  logic hs_q = 1, vs_q = 1, de_q = 0;
  bit bank_at_frame;
  always @(negedge clk) begin
    clk_n++;
    if (rst_n && enable) begin
      if (hs_q && !vga_hsync) begin
        if (hs_fall >= 0) check(clk_n - hs_fall == 800 * PIX_DIV, "hsync period");
        hs_fall = clk_n;
      end
      if (!hs_q && vga_hsync && hs_fall >= 0) check(clk_n - hs_fall == 96 * PIX_DIV, "hsync width");
      if (vs_q && !vga_vsync) begin
        if (vs_fall >= 0) begin
          check(clk_n - vs_fall == 525 * 800 * PIX_DIV, "vsync period");
          check(lines_de == 480, $sformatf("active lines %0d", lines_de));
          frames++;
        end
        vs_fall = clk_n;
        line = -1;
        lines_de = 0;
      end
      if (!vs_q && vga_vsync && vs_fall >= 0) check(clk_n - vs_fall == 2 * 800 * PIX_DIV, "vsync width");
      if (vga_de && !de_q) begin
        de_rise = clk_n; line++; lines_de++;
        bank_at_frame = disp_bank;
      end
      if (!vga_de && de_q) check(clk_n - de_rise == 640 * PIX_DIV, "active pixels per line");
      if (vga_de && vs_fall >= 0) begin
        int col, e;
        col = int'(clk_n - de_rise) / PIX_DIV;
        if (col < (8 << ZOOM) && line < (8 << ZOOM))
          e = int'(mem.mem[(disp_bank ? B1 : B0) + (line >> ZOOM) * 8 + (col >> ZOOM)][7:0]);
        else e = 0;
        if (int'(vga_grey) != e) begin
          pix_fail++;
          if (pix_fail < 10) $display("line %0d col %0d: %0d expected %0d", line, col, vga_grey, e);
        end
      end
      hs_q = vga_hsync; vs_q = vga_vsync; de_q = vga_de;
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      mem.mem[B0 + i] = 32'($urandom % 256);
      mem.mem[B1 + i] = 32'($urandom % 256);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    wait (frames == 1);
    // switch banks during vertical blanking
    @(negedge clk) disp_bank = 1;
    wait (frames == 3);
    checks++;
    if (pix_fail != 0) begin failures++; $display("%0d pixel mismatches", pix_fail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
