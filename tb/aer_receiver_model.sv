// aer_receiver_model: behavioural AER receiver chip for testbenches.
//
// Waits for req, stores the address from the data lines in `got`, raises
// ack after a random delay of up to MAX_DELAY clocks, waits for req to fall
// and drops ack. Sampling and driving happen at falling clock edges. With
// hold set, ack is withheld, which blocks the sender (back-pressure).
module aer_receiver_model
  import aer_pkg::*;
#(
  parameter int MAX_DELAY = 0
) (
  input  logic      clk,
  input  logic      req,
  input  aer_addr_t data,
  output logic      ack
);
  aer_addr_t got [$];
  bit        hold = 0;

  initial begin
    ack = 0;
    forever begin
      do @(negedge clk); while (!req);
      got.push_back(data);
      if (MAX_DELAY > 0) repeat ($urandom % (MAX_DELAY + 1)) @(negedge clk);
      while (hold) @(negedge clk);
      ack = 1;
      do @(negedge clk); while (req);
      ack = 0;
    end
  end
endmodule
