// tb_aer_sync: checks that the two-flip-flop synchroniser delivers each
// input value exactly two clock edges later, for random 4-bit inputs.
module tb_aer_sync;
  logic clk = 0, rst_n = 0;
  logic [3:0] d, q;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  aer_sync #(.WIDTH(4)) dut (.clk, .rst_n, .d_async(d), .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (q !== 4'h0) begin failures++; $display("reset value wrong"); end
    rst_n = 1;
    for (int i = 0; i < 3; i++) hist[i] = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("cycle %0d: q=%h expected %h", n, q, hist[1]);
        end
      end
      hist[2] = hist[1]; hist[1] = hist[0];
      d = 4'($urandom);
      hist[0] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
