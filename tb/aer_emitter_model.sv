// aer_emitter_model: behavioural AER emitter chip for testbenches.
//
// Sends the addresses queued with send() over the four-phase handshake:
// data are set, req rises at the next falling clock edge, req falls at the
// falling edge after ack is seen, and the next event waits for ack to fall.
// MAX_GAP > 0 adds a random pause of up to MAX_GAP clocks between events.
// `sent` counts completed handshakes.
module aer_emitter_model
  import aer_pkg::*;
#(
  parameter int MAX_GAP = 0
) (
  input  logic      clk,
  output logic      req,
  output aer_addr_t data,
  input  logic      ack
);
  aer_addr_t q [$];
  int        sent = 0;

  initial begin
    req  = 0;
    data = '0;
    forever begin
      @(negedge clk);
      if (q.size() != 0 && !ack) begin
        data = q.pop_front();
        @(negedge clk);
        req = 1;
        do @(negedge clk); while (!ack);
        req = 0;
        do @(negedge clk); while (ack);
        sent++;
        if (MAX_GAP > 0) repeat ($urandom % (MAX_GAP + 1)) @(negedge clk);
      end
    end
  end

  function automatic void send(aer_addr_t a);
    q.push_back(a);
  endfunction
endmodule
