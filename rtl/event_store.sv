// event_store: records timestamped events in the SRAM bank and reads them
// back for playback.
//
// Recording: each {dt, addr} word accepted on the input stream is written
// to the next SRAM word, starting at word BASE, until DEPTH words are held
// (512K events fill the 512K x 32 bank). Then `full` rises and in_ready
// stays low, so the upstream port blocks rather than dropping events.
// rec_start clears the recording. Playback: play_start rewinds the read
// pointer; while play_en is high the recorded words are read in order and
// offered on the output stream; with loop high the sequence restarts after
// its last word, otherwise `done` rises.
//
// Memory port: one request per clock at most, granted when rsp.gnt is high,
// read data one clock later. A read is issued only when no read is in
// flight and the output register is free, so playback runs at one word per
// two clocks at most, well above what the AER handshake can carry.
module event_store
  import aer_pkg::*;
#(
  parameter int unsigned DEPTH = 524288,
  parameter mem_addr_t   BASE  = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rec_start,
  input  logic      rec_en,
  input  logic      play_start,
  input  logic      play_en,
  input  logic      loop,
  // recording input
  input  logic      in_valid,
  input  ts_event_t in_event,
  output logic      in_ready,
  // playback output
  output logic      out_valid,
  output ts_event_t out_event,
  input  logic      out_ready,
  // SRAM port
  output mem_req_t  mem_req,
  input  mem_rsp_t  mem_rsp,
  // status
  output logic [19:0] rec_count,
  output logic        full,
  output logic        done
);
  logic [19:0] rd_ptr;
  logic        rd_pending;
  logic        do_read;

  assign full     = (rec_count == 20'(DEPTH));
  assign in_ready = rec_en && !full && mem_rsp.gnt;
  assign do_read  = play_en && !rec_en && !done && !rd_pending &&
                    !out_valid && (rec_count != '0);

  always_comb begin
    mem_req = '0;
    if (rec_en) begin
      mem_req.req   = in_valid && !full;
      mem_req.we    = 1'b1;
      mem_req.addr  = BASE + mem_addr_t'(rec_count);
      mem_req.wdata = in_event;
    end else if (do_read) begin
      mem_req.req  = 1'b1;
      mem_req.addr = BASE + mem_addr_t'(rd_ptr);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_count  <= '0;
      rd_ptr     <= '0;
      rd_pending <= 1'b0;
      out_valid  <= 1'b0;
      out_event  <= '0;
      done       <= 1'b0;
    end else begin
      if (rec_start) rec_count <= '0;
      else if (in_valid && in_ready) rec_count <= rec_count + 20'd1;

      if (out_valid && out_ready) out_valid <= 1'b0;
      if (mem_rsp.rvalid && rd_pending) begin
        out_event  <= ts_event_t'(mem_rsp.rdata);
        out_valid  <= 1'b1;
        rd_pending <= 1'b0;
      end

      if (play_start || rec_start) begin
        // rewind; a word in flight or waiting is dropped
        rd_ptr     <= '0;
        done       <= 1'b0;
        rd_pending <= 1'b0;
        out_valid  <= 1'b0;
      end else if (do_read && mem_rsp.gnt) begin
        rd_pending <= 1'b1;
        if (rd_ptr + 20'd1 == rec_count) begin
          rd_ptr <= '0;
          done   <= !loop;
        end else begin
          rd_ptr <= rd_ptr + 20'd1;
        end
      end
    end
  end
endmodule
