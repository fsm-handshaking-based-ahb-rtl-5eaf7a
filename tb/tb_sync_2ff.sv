// tb_sync_2ff: checks that the synchroniser passes each input value through
// after exactly two clock edges, and that reset clears both stages.
module tb_sync_2ff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] d, q;
  logic [3:0] hist [1];
  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(4)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'hA;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    hist[0] = 4'h0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 4'($urandom);
      @(posedge clk);
      #1;
      // the value sampled on the previous edge has passed the second stage
      checks++;
      if (i >= 1 && q !== hist[0]) begin
        failures++; $display("FAIL cycle %0d q=%h exp=%h", i, q, hist[0]);
      end
      hist[0] = d;
    end
    // one edge is not enough: a new value must not show after a single edge
    @(negedge clk); d = ~q; @(posedge clk); #1;
    checks++;
    if (q === d) begin failures++; $display("FAIL value passed in one edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
