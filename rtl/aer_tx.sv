// aer_tx: AER transmitter port (the instrument acting as an AER emitter).
//
// Takes addresses from a valid/ready stream and sends each one over the
// four-phase request/acknowledge handshake: the address is driven on the
// data lines, req is raised one clock later (one clock of data set-up), the
// receiver's ack is awaited, req is dropped, and the falling ack is awaited
// before the next event. ack passes through the two-flip-flop synchroniser.
//
// A new event is taken from the stream (ev_ready pulses) only when the port
// is idle, so a slow receiver blocks the source, which is the AER
// back-pressure. With a receiver that answers within a clock one event takes
// about eight clocks. Active-high req/ack and the one-clock set-up are this
// design's choices.
module aer_tx
  import aer_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ev_valid,
  input  aer_addr_t ev_addr,
  output logic      ev_ready,
  output logic      aer_req,
  output aer_addr_t aer_data,
  input  logic      aer_ack,
  output logic [31:0] ev_count
);
  typedef enum logic [1:0] {TX_IDLE, TX_SETUP, TX_REQ, TX_RELEASE} tx_state_e;
  tx_state_e state;
  logic      ack_s;

  aer_sync #(.WIDTH(1)) u_sync (
    .clk, .rst_n, .d_async(aer_ack), .q(ack_s)
  );

  assign ev_ready = (state == TX_IDLE) && !ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      aer_req  <= 1'b0;
      aer_data <= '0;
      ev_count <= '0;
    end else begin
      unique case (state)
        TX_IDLE: if (ev_valid && !ack_s) begin
          aer_data <= ev_addr;
          state    <= TX_SETUP;
        end
        TX_SETUP: begin
          aer_req <= 1'b1;
          state   <= TX_REQ;
        end
        TX_REQ: if (ack_s) begin
          aer_req  <= 1'b0;
          ev_count <= ev_count + 32'd1;
          state    <= TX_RELEASE;
        end
        TX_RELEASE: if (!ack_s) state <= TX_IDLE;
        default: state <= TX_IDLE;
      endcase
    end
  end

  // data must not change while a request is pending
  a_data_stable : assert property (@(posedge clk) disable iff (!rst_n)
    aer_req |=> $stable(aer_data));
endmodule
