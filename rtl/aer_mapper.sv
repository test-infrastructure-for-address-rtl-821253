// aer_mapper: event-to-event(s) remapping through a mapping RAM.
//
// Every input address indexes a table in the SRAM bank (word TBL_BASE +
// address). In one-to-one mode (multi = 0) the table word is
//   [31] valid, [15:0] output address
// and the event leaves with the new address. In one-to-several mode
// (multi = 1) the table word is
//   [31] valid, [26:19] n = number of output events, [18:0] list pointer
// and the n words from the list pointer on hold the output addresses in
// bits [15:0], which leave in order. An input address whose table word is
// not valid (or has n = 0) produces no output event. The table layout,
// the list format and dropping unmapped events are this design's choices;
// the two mapping modes are the board's.
//
// Flow: a new input event is taken only when the previous one is fully
// mapped and the output register is free, so a slow receiver blocks the
// emitter instead of losing events. One table read and one list read per
// output event, one clock each, plus one clock for the output register.
module aer_mapper
  import aer_pkg::*;
#(
  parameter mem_addr_t TBL_BASE = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      multi,
  input  logic      in_valid,
  input  aer_addr_t in_addr,
  output logic      in_ready,
  output logic      out_valid,
  output aer_addr_t out_addr,
  input  logic      out_ready,
  output mem_req_t  mem_req,
  input  mem_rsp_t  mem_rsp,
  output logic [31:0] in_count,
  output logic [31:0] out_count
);
  typedef enum logic [1:0] {M_IDLE, M_TABLE, M_LIST, M_LDATA} map_state_e;
  map_state_e state;
  mem_addr_t  ptr;
  logic [7:0] remaining;
  logic       out_free;

  assign out_free = !out_valid || out_ready;
  assign in_ready = enable && (state == M_IDLE) && out_free && mem_rsp.gnt;

  always_comb begin
    mem_req = '0;
    unique case (state)
      M_IDLE: begin
        mem_req.req  = enable && in_valid && out_free;
        mem_req.addr = TBL_BASE + mem_addr_t'(in_addr);
      end
      M_LIST: begin
        mem_req.req  = out_free;
        mem_req.addr = ptr;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      ptr       <= '0;
      remaining <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
      in_count  <= '0;
      out_count <= '0;
    end else begin
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        out_count <= out_count + 32'd1;
      end
      unique case (state)
        M_IDLE: if (in_valid && in_ready) begin
          in_count <= in_count + 32'd1;
          state    <= M_TABLE;
        end
        M_TABLE: if (mem_rsp.rvalid) begin
          state <= M_IDLE;
          if (mem_rsp.rdata[31]) begin
            if (!multi) begin
              out_addr  <= mem_rsp.rdata[15:0];
              out_valid <= 1'b1;
            end else if (mem_rsp.rdata[26:19] != '0) begin
              remaining <= mem_rsp.rdata[26:19];
              ptr       <= mem_rsp.rdata[18:0];
              state     <= M_LIST;
            end
          end
        end
        M_LIST: if (mem_req.req && mem_rsp.gnt) state <= M_LDATA;
        M_LDATA: if (mem_rsp.rvalid) begin
          out_addr  <= mem_rsp.rdata[15:0];
          out_valid <= 1'b1;
          ptr       <= ptr + 1'b1;
          remaining <= remaining - 8'd1;
          state     <= (remaining == 8'd1) ? M_IDLE : M_LIST;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  a_one_cycle_read : assert property (@(posedge clk) disable iff (!rst_n)
    (state == M_TABLE || state == M_LDATA) |-> mem_rsp.rvalid);
endmodule
