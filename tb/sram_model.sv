// sram_model: behavioural model of the 512K x 32 asynchronous SRAM bank
// (behavioural model, testbench only).
//
// Reads are combinational: while oe is high, rdata shows the word at addr.
// A write stores wdata at addr at the clock edge that ends a cycle with we
// high; the clock input stands in for the write-enable pulse timing of the
// real part. AW can be reduced to save simulation memory; the address is
// then taken modulo the smaller size. Unwritten words read as zero.
module sram_model #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic [18:0]   addr,
  input  logic [DW-1:0] wdata,
  input  logic          we,
  input  logic          oe,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [1 << AW];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
  end

  assign rdata = oe ? mem[addr[AW-1:0]] : '0;

  always @(posedge clk) begin
    if (we) mem[addr[AW-1:0]] <= wdata;
  end
endmodule
