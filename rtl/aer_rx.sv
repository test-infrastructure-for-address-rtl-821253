// aer_rx: AER receiver port (the instrument acting as an AER receiver chip).
//
// An emitter puts an address on the AER data lines and raises req; the
// receiver takes the address and raises ack; the emitter drops req and the
// receiver drops ack (four-phase handshake on the request and acknowledge
// lines). req passes through the two-flip-flop synchroniser before use. The
// data lines are sampled when the synchronised req is seen high: they were
// set up before req rose, so they are stable by then.
//
// The captured address is offered on a valid/ready stream. There is one
// holding register: if it is still full, ack is withheld and the emitter is
// blocked until the downstream logic takes the event. Nothing is lost; the
// emitter just sees a slower receiver.
//
// Timing: with an emitter that answers within one clock, one event takes
// about six clocks (two synchroniser stages on each edge of req plus the
// registered ack), so the clock must be about six times the event rate.
// Active-high req/ack and one holding register are this design's choices.
module aer_rx
  import aer_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // AER bus (asynchronous)
  input  logic      aer_req,
  input  aer_addr_t aer_data,
  output logic      aer_ack,
  // received events
  output logic      ev_valid,
  output aer_addr_t ev_addr,
  input  logic      ev_ready,
  // number of completed handshakes
  output logic [31:0] ev_count
);
  logic req_s;

  aer_sync #(.WIDTH(1)) u_sync (
    .clk, .rst_n, .d_async(aer_req), .q(req_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aer_ack  <= 1'b0;
      ev_valid <= 1'b0;
      ev_addr  <= '0;
      ev_count <= '0;
    end else begin
      if (ev_valid && ev_ready) ev_valid <= 1'b0;
      if (!aer_ack) begin
        // accept a new request only into an empty (or emptying) holder
        if (req_s && (!ev_valid || ev_ready)) begin
          ev_addr  <= aer_data;
          ev_valid <= 1'b1;
          aer_ack  <= 1'b1;
          ev_count <= ev_count + 32'd1;
        end
      end else if (!req_s) begin
        aer_ack <= 1'b0;
      end
    end
  end

  // the stream must hold its event until it is taken
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    ev_valid && !ev_ready |=> ev_valid && $stable(ev_addr));
endmodule
