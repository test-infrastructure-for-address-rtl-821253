// vga_frame_out: shows the grabbed frame on a VGA monitor.
//
// Generates 640 x 480 VGA timing (800 x 525 pixel clocks per frame, sync
// pulses active low) with one pixel every PIX_DIV clocks, and draws the
// last complete frame of the frame monitor, NCOL x NROW pixels each
// magnified 2**ZOOM times, in the top-left corner as a grey level; the rest
// of the screen is black. During the horizontal blanking before each image
// line that starts a new frame row, the row's NCOL pixel counts are read
// from the displayed SRAM buffer into a line buffer (one read per clock,
// read data one clock later); the visible line then reads only the line
// buffer. The fetch needs NCOL + 1 clocks out of the 160 pixel clocks of
// blanking, so it always completes while the SRAM read port is granted.
//
// The display's existence is the board's; the video mode, the zoom and
// the line-buffer scheme are this design's choices.
module vga_frame_out
  import aer_pkg::*;
#(
  parameter int unsigned PIX_DIV = 2,        // clocks per pixel (50 MHz -> 25 MHz)
  parameter int unsigned COL_W   = 7,        // 128 columns
  parameter int unsigned ROW_W   = 7,        // 128 rows
  parameter int unsigned LVL_W   = 8,
  parameter int unsigned ZOOM    = 1,        // x2
  parameter mem_addr_t   BANK0   = 19'h40000,
  parameter mem_addr_t   BANK1   = 19'h60000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             disp_bank,
  output mem_req_t         mem_req,
  input  mem_rsp_t         mem_rsp,
  output logic             vga_hsync,
  output logic             vga_vsync,
  output logic             vga_de,
  output logic [LVL_W-1:0] vga_grey
);
  localparam int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_TOT = 800;
  localparam int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_TOT = 525;
  localparam int unsigned NCOL = 1 << COL_W;
  localparam int unsigned NROW = 1 << ROW_W;

  logic [$clog2(PIX_DIV+1)-1:0] div;
  logic       pce;
  logic [9:0] hcnt, vcnt, next_v;
  logic [LVL_W-1:0] line_buf [NCOL];

  // line fetch
  logic             fetching, rd_q;
  logic [COL_W-1:0] fcol, wcol;
  logic [ROW_W-1:0] frow;
  logic             fetch_start;

  assign pce    = (div == '0);
  assign next_v = (vcnt == 10'(V_TOT - 1)) ? 10'd0 : vcnt + 10'd1;
  assign fetch_start = enable && pce && (hcnt == 10'(H_VIS)) &&
                       (next_v < 10'(NROW << ZOOM)) &&
                       (next_v[ZOOM-1:0] == '0);

  always_comb begin
    mem_req      = '0;
    mem_req.req  = fetching;
    mem_req.addr = (disp_bank ? BANK1 : BANK0) +
                   mem_addr_t'({frow, fcol});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div      <= '0;
      hcnt     <= '0;
      vcnt     <= '0;
      fetching <= 1'b0;
      rd_q     <= 1'b0;
      fcol     <= '0;
      wcol     <= '0;
      frow     <= '0;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      vga_de    <= 1'b0;
      vga_grey  <= '0;
    end else begin
      div <= (div == $bits(div)'(PIX_DIV - 1)) ? '0 : div + 1'b1;
      if (pce) begin
        if (hcnt == 10'(H_TOT - 1)) begin
          hcnt <= '0;
          vcnt <= next_v;
        end else begin
          hcnt <= hcnt + 10'd1;
        end
        vga_hsync <= !(hcnt >= 10'(H_VIS + H_FP) && hcnt < 10'(H_VIS + H_FP + H_SYNC));
        vga_vsync <= !(vcnt >= 10'(V_VIS + V_FP) && vcnt < 10'(V_VIS + V_FP + V_SYNC));
        vga_de    <= (hcnt < 10'(H_VIS)) && (vcnt < 10'(V_VIS));
        if (enable && hcnt < 10'(NCOL << ZOOM) && vcnt < 10'(NROW << ZOOM))
          vga_grey <= line_buf[hcnt[ZOOM +: COL_W]];
        else
          vga_grey <= '0;
      end

      rd_q <= 1'b0;
      if (fetch_start) begin
        fetching <= 1'b1;
        fcol     <= '0;
        frow     <= next_v[ZOOM +: ROW_W];
      end else if (fetching && mem_rsp.gnt) begin
        rd_q <= 1'b1;
        wcol <= fcol;
        fcol <= fcol + 1'b1;
        if (fcol == COL_W'(NCOL - 1)) fetching <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_q && mem_rsp.rvalid) line_buf[wcol] <= mem_rsp.rdata[LVL_W-1:0];
  end
endmodule
