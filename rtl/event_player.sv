// event_player: sequencer for recorded, timestamped event streams.
//
// Takes {dt, addr} words (the format written by event_timestamper) and
// issues addr once dt ticks of the time base have passed since the previous
// event left (or since enable rose, for the first one). A stream recorded
// from one chip thus reaches another chip with its inter-spike intervals,
// as long as the receiver keeps up; a receiver that blocks delays the event
// and the following ones count from when it actually left.
//
// The output is not registered: out_valid rises in the clock the head word
// becomes due, out_addr is the head word's address, and the word is
// consumed (in_ready) in the clock the output is taken, which is also when
// the interval to the next event starts. The AER transmitter behind it
// registers the address.
module event_player
  import aer_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      tick,
  input  logic      in_valid,
  input  ts_event_t in_event,
  output logic      in_ready,
  output logic      out_valid,
  output aer_addr_t out_addr,
  input  logic      out_ready
);
  aer_ts_t cnt;  // ticks since the previous event left

  // the head word leaves, unregistered, once it is due and taken
  assign out_valid = enable && in_valid && (cnt >= in_event.dt);
  assign out_addr  = in_event.addr;
  assign in_ready  = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (!enable) begin
      cnt <= '0;
    end else if (in_ready) begin
      cnt <= aer_ts_t'(tick);
    end else if (tick && cnt != '1) begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
