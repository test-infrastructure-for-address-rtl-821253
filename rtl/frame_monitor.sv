// frame_monitor: AER to frame conversion (the frame-grabber function).
//
// The number of events received for each pixel address during a frame
// period is that pixel's grey level, so the monitor counts events per
// address over the frame period into a frame buffer in the SRAM bank. Two
// buffers alternate: while one is counted into, the other holds the last
// complete frame for the host or a display (disp_bank tells which). At the
// end of each frame period (frame_cycles clocks) the buffers swap, and the
// new counting buffer is first cleared; events arriving during the clear
// are held off (the AER port blocks the emitter for NPIX clocks).
//
// The pixel index is the low PIX_W bits of the event address (the bits
// above are ignored, so lint reports them unused); one SRAM word
// holds one pixel, its count in the low CNT_W bits, saturating at the
// maximum grey level. Each event costs a read and a write of its word
// (read-modify-write), three clocks in all. Defaults follow the 128 x 128,
// 256-level imager example; buffer placement, the clear-on-swap and
// saturation are this design's choices.
module frame_monitor
  import aer_pkg::*;
#(
  parameter int unsigned PIX_W = 14,   // 128 x 128 pixels
  parameter int unsigned CNT_W = 8,    // 256 grey levels
  parameter mem_addr_t   BANK0 = 19'h40000,
  parameter mem_addr_t   BANK1 = 19'h60000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [31:0] frame_cycles,
  input  logic        in_valid,
  input  aer_addr_t   in_addr,
  output logic        in_ready,
  output mem_req_t    mem_req,
  input  mem_rsp_t    mem_rsp,
  output logic        disp_bank,
  output logic [31:0] frame_count,
  output logic        frame_done,
  output logic [31:0] sat_count
);
  localparam int unsigned NPIX = 1 << PIX_W;

  typedef enum logic [1:0] {F_CLEAR, F_COUNT, F_READ, F_WRITE} fm_state_e;
  fm_state_e       state;
  logic            wbank;
  logic [PIX_W-1:0] pix, clr_ptr;
  logic [CNT_W-1:0] cnt_new;
  logic [31:0]     timer;
  logic            swap_due;
  mem_addr_t       wbase;

  assign wbase    = wbank ? BANK1 : BANK0;
  assign in_ready = enable && (state == F_COUNT) && !swap_due && mem_rsp.gnt;

  always_comb begin
    mem_req = '0;
    unique case (state)
      F_CLEAR: begin
        mem_req.req  = enable;
        mem_req.we   = 1'b1;
        mem_req.addr = wbase + mem_addr_t'(clr_ptr);
      end
      F_COUNT: begin
        mem_req.req  = enable && in_valid && !swap_due;
        mem_req.addr = wbase + mem_addr_t'(in_addr[PIX_W-1:0]);
      end
      F_WRITE: begin
        mem_req.req   = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = wbase + mem_addr_t'(pix);
        mem_req.wdata = mem_data_t'(cnt_new);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= F_CLEAR;
      wbank       <= 1'b0;
      disp_bank   <= 1'b1;
      pix         <= '0;
      clr_ptr     <= '0;
      cnt_new     <= '0;
      timer       <= '0;
      swap_due    <= 1'b0;
      frame_count <= '0;
      frame_done  <= 1'b0;
      sat_count   <= '0;
    end else begin
      frame_done <= 1'b0;
      if (!enable) begin
        timer    <= '0;
        swap_due <= 1'b0;
      end else if (timer + 32'd1 >= frame_cycles) begin
        timer    <= '0;
        swap_due <= 1'b1;
      end else begin
        timer <= timer + 32'd1;
      end

      unique case (state)
        F_CLEAR: if (enable && mem_rsp.gnt) begin
          clr_ptr <= clr_ptr + 1'b1;
          if (clr_ptr == PIX_W'(NPIX - 1)) state <= F_COUNT;
        end
        F_COUNT: begin
          if (swap_due) begin
            // complete frame becomes the displayed one
            swap_due    <= 1'b0;
            disp_bank   <= wbank;
            wbank       <= !wbank;
            frame_count <= frame_count + 32'd1;
            frame_done  <= 1'b1;
            clr_ptr     <= '0;
            state       <= F_CLEAR;
          end else if (in_valid && in_ready) begin
            pix   <= in_addr[PIX_W-1:0];
            state <= F_READ;
          end
        end
        F_READ: if (mem_rsp.rvalid) begin
          if (mem_rsp.rdata[CNT_W-1:0] == '1) begin
            cnt_new   <= '1;
            sat_count <= sat_count + 32'd1;
          end else begin
            cnt_new <= mem_rsp.rdata[CNT_W-1:0] + 1'b1;
          end
          state <= F_WRITE;
        end
        F_WRITE: if (mem_rsp.gnt) state <= F_COUNT;
        default: state <= F_COUNT;
      endcase
    end
  end
endmodule
