// mem_port_model: memory behind one mem_req_t / mem_rsp_t port, for block
// testbenches (behavioural model).
//
// Grants a request in a cycle where gnt is high; when STALL is non-zero gnt
// is withheld at random in about one cycle in STALL, as a higher-priority
// master would. Read data come back one clock after the granted request
// with rvalid. The array is public so testbenches load and inspect it.
module mem_port_model
  import aer_pkg::*;
#(
  parameter int unsigned AW    = 19,
  parameter int unsigned STALL = 0
) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  mem_data_t mem [1 << AW];
  logic      gnt_r;
  logic      rvalid_r;
  mem_data_t rdata_r;

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
    gnt_r    = 1'b1;
    rvalid_r = 1'b0;
    rdata_r  = '0;
  end

  assign rsp.gnt    = gnt_r;
  assign rsp.rvalid = rvalid_r;
  assign rsp.rdata  = rdata_r;

  always @(posedge clk) begin
    rvalid_r <= 1'b0;
    if (req.req && gnt_r) begin
      if (req.we) mem[req.addr[AW-1:0]] <= req.wdata;
      else begin
        rvalid_r <= 1'b1;
        rdata_r  <= mem[req.addr[AW-1:0]];
      end
    end
    gnt_r <= (STALL == 0) ? 1'b1 : (($urandom % STALL) != 0);
  end
endmodule
