// frame_sequencer: frame to AER conversion (synthetic event generator).
//
// A grey-level frame held in the SRAM bank (one pixel per word, grey level
// in the low LVL_W bits, pixel i at word FRAME_BASE + i) is turned into an
// AER stream in which, over one frame period, each pixel emits on average
// as many events as its grey level, spread over the period. The period is
// split into NLEV = 2**LVL_W slices and every slice makes NPIX trials, each
// reading one pixel:
//
//  * exhaustive method (method = 0): slice k visits every pixel p in order
//    and emits p when the low LVL_W bits of k*g(p), plus g(p), carry into
//    bit LVL_W. Over the NLEV slices pixel p then emits exactly g(p)
//    events, evenly spaced (the carry pattern of a running sum of g).
//  * random method (method = 1): each trial takes a pixel address p and a
//    number r from a 32-bit maximal-length LFSR and emits p when r < g(p),
//    so a pixel emits g(p) events per frame on average.
//
// A slice lasts at least slice_cycles clocks, which sets the frame rate
// (frame period = NLEV * slice slots); a slow receiver stretches it. The
// event address is the pixel index. The two method names come from the
// board; the carry rule, the LFSR and the slice pacing are this design's
// reading of them. frame_count counts completed frame periods.
module frame_sequencer
  import aer_pkg::*;
#(
  parameter int unsigned PIX_W      = 14,  // 128 x 128 pixels
  parameter int unsigned LVL_W      = 8,   // 256 grey levels
  parameter mem_addr_t   FRAME_BASE = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        method,        // 0 exhaustive, 1 random
  input  logic [31:0] slice_cycles,
  output logic        out_valid,
  output aer_addr_t   out_addr,
  input  logic        out_ready,
  output mem_req_t    mem_req,
  input  mem_rsp_t    mem_rsp,
  output logic [31:0] frame_count,
  output logic [31:0] event_count
);
  typedef enum logic [1:0] {S_READ, S_EVAL, S_WAIT} seq_state_e;
  seq_state_e       state;
  logic [LVL_W-1:0] slice;
  logic [PIX_W-1:0] trial;     // trial number within the slice
  logic [PIX_W-1:0] pix;       // pixel being evaluated
  logic [LVL_W-1:0] rnd;       // random threshold of the trial
  logic [31:0]      lfsr;
  logic [31:0]      timer;
  logic             out_free;
  logic [LVL_W-1:0] g;
  logic [LVL_W-1:0] prod;     // k*g mod NLEV
  logic [LVL_W:0]   acc;
  logic             fire;
  logic [PIX_W-1:0] next_pix;

  assign out_free = !out_valid || out_ready;
  assign g        = mem_rsp.rdata[LVL_W-1:0];
  assign prod     = LVL_W'(slice * g);
  assign acc      = {1'b0, prod} + {1'b0, g};
  assign fire     = method ? (rnd < g) : acc[LVL_W];
  assign next_pix = method ? lfsr[PIX_W-1:0] : trial;

  always_comb begin
    mem_req      = '0;
    mem_req.req  = enable && (state == S_READ) && out_free;
    mem_req.addr = FRAME_BASE + mem_addr_t'(next_pix);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_READ;
      slice       <= '0;
      trial       <= '0;
      pix         <= '0;
      rnd         <= '0;
      lfsr        <= 32'h1;
      timer       <= '0;
      out_valid   <= 1'b0;
      out_addr    <= '0;
      frame_count <= '0;
      event_count <= '0;
    end else if (!enable) begin
      state     <= S_READ;
      slice     <= '0;
      trial     <= '0;
      timer     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (timer != '1) timer <= timer + 32'd1;
      unique case (state)
        S_READ: if (mem_req.req && mem_rsp.gnt) begin
          pix <= next_pix;
          rnd <= lfsr[31:32-LVL_W];
          if (method) begin
            // Galois LFSR, taps 32,22,2,1
            lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
          end
          state <= S_EVAL;
        end
        S_EVAL: if (mem_rsp.rvalid) begin
          if (fire) begin
            out_addr    <= aer_addr_t'(pix);
            out_valid   <= 1'b1;
            event_count <= event_count + 32'd1;
          end
          trial <= trial + 1'b1;
          state <= (trial == '1) ? S_WAIT : S_READ;
        end
        S_WAIT: if (timer + 32'd1 >= slice_cycles) begin
          timer <= '0;
          slice <= slice + 1'b1;
          if (slice == '1) frame_count <= frame_count + 32'd1;
          state <= S_READ;
        end
        default: state <= S_READ;
      endcase
    end
  end
endmodule
