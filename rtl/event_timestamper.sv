// event_timestamper: tags each received AER event with its timing.
//
// This is the monitor ("sniffer") function: every event arriving on the
// input stream leaves as a 32-bit word {dt, addr}, two bytes of address and
// two bytes of timing. dt is the number of time-base ticks between this
// event and the previous one (or since enable rose, for the first event),
// so the inter-spike intervals, which carry the information in AER, are
// kept. tick is a one-clock strobe from a shared time base. A dt that does
// not fit in 16 bits saturates at 16'hFFFF; relative rather than absolute
// time and the saturation are this design's choices.
//
// One output register: in_ready is high when it is empty or being emptied,
// so an event passes in one clock. Events are counted in ev_count.
module event_timestamper
  import aer_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      tick,
  input  logic      in_valid,
  input  aer_addr_t in_addr,
  output logic      in_ready,
  output logic      out_valid,
  output ts_event_t out_event,
  input  logic      out_ready
);
  aer_ts_t cnt;
  logic    take;

  assign in_ready = enable && (!out_valid || out_ready);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_event <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (take) begin
        out_event <= '{dt: cnt, addr: in_addr};
        out_valid <= 1'b1;
        cnt       <= aer_ts_t'(tick);
      end else if (tick && cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
