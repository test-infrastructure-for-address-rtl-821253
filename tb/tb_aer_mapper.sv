// tb_aer_mapper: checks one-to-one and one-to-several remapping.
//
// A random mapping table is written into the memory model for input
// addresses 0..255 (about one in eight left unmapped); addresses above 255
// have no entry. In one-to-one mode 400 random input events must come out
// as the table's output addresses, in order, with unmapped ones dropped.
// In one-to-several mode each entry points to a list of 1..6 output
// addresses (some entries have n = 0) and 300 input events must produce
// exactly the concatenated lists. The memory withholds its grant at random
// and the output sees random back-pressure.
module tb_aer_mapper;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, multi = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  aer_addr_t in_addr = '0, out_addr;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic [31:0] in_count, out_count;
  int checks = 0, failures = 0;
  aer_addr_t expq [$];
  int nin = 0, nout = 0, nmulti = 0, ndrop = 0;

  aer_mapper dut (.*);
  mem_port_model #(.AW(17), .STALL(5)) mem (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs of one input event, from the table contents
  task automatic expect_for(aer_addr_t a);
    mem_data_t w;
    w = mem.mem[a];
    if (!w[31]) begin ndrop++; return; end
    if (!multi) expq.push_back(w[15:0]);
    else begin
      if (w[26:19] == 0) ndrop++;
      if (w[26:19] > 1) nmulti++;
      for (int k = 0; k < int'(w[26:19]); k++)
        expq.push_back(mem.mem[int'(w[18:0]) + k][15:0]);
    end
  endtask

  task automatic load_table(bit m);
    int next = 'h10000;
    for (int a = 0; a < 'h10000; a++) mem.mem[a] = '0;
    for (int a = 0; a < 256; a++) begin
      if ($urandom % 8 == 0) continue;
      if (!m) mem.mem[a] = {1'b1, 15'd0, 16'($urandom)};
      else begin
        int n = $urandom % 7;
        mem.mem[a] = {1'b1, 4'd0, 8'(n), 19'(next)};
        for (int k = 0; k < n; k++) mem.mem[next + k] = {16'd0, 16'($urandom)};
        next += n;
      end
    end
  endtask

  task automatic run(int n_events);
    int target;
    bit fi = 0, fo;
    target = nin + n_events;
    while (nin < target || expq.size() > 0) begin
      @(negedge clk);
      if (fi) in_valid = 0;
      out_ready = ($urandom % 3) != 0;
      if (!in_valid && nin < target && $urandom % 2 == 0) begin
        in_valid = 1;
        in_addr = ($urandom % 10 == 0) ? aer_addr_t'(256 + $urandom % 1000)
                                       : aer_addr_t'($urandom % 256);
      end
      #1;
      fi = in_valid && in_ready;
      fo = out_valid && out_ready;
      if (fo) begin
        aer_addr_t e;
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected output %h", out_addr); end
        else begin
          e = expq.pop_front();
          if (out_addr !== e) begin
            failures++; $display("output %0d: got %h expected %h", nout, out_addr, e);
          end
        end
        nout++;
      end
      if (fi) begin
        expect_for(in_addr);
        nin++;
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra output %h", out_addr); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_table(0);
    @(negedge clk); enable = 1;
    run(400);
    load_table(1);
    multi = 1;
    run(300);
    checks++;
    if (in_count != 700 || out_count != nout) begin
      failures++; $display("counters %0d %0d (%0d)", in_count, out_count, nout);
    end
    checks++;
    if (nmulti == 0 || ndrop == 0) begin failures++; $display("mechanism not exercised"); end
    $display("outputs %0d, one-to-several events %0d, dropped %0d", nout, nmulti, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
