// aer_sync: brings asynchronous AER protocol lines into the clock domain.
//
// The AER handshake is asynchronous while the instruments' logic is
// synchronous, so every incoming protocol line passes through two cascaded
// flip-flops before any decision is taken on it, as the boards do. The
// output follows the input two clock edges later. WIDTH lines are
// synchronised independently; RST_VAL is the value they hold in reset (the
// reset value is this design's choice).
module aer_sync #(
  parameter int unsigned WIDTH   = 1,
  parameter logic        RST_VAL = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_async,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= {WIDTH{RST_VAL}};
      q    <= {WIDTH{RST_VAL}};
    end else begin
      meta <= d_async;
      q    <= meta;
    end
  end
endmodule
