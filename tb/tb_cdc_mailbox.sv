// tb_cdc_mailbox: sends 300 random words across the mailbox between two
// unrelated clocks (7 ns and 11 ns), with random put and take timing. Checks
// that every word arrives once, in order and unchanged, that the destination
// sees a word within 3 destination clock edges of the put, and that the
// source sees the mailbox free again within 3 source edges of the take.
module tb_cdc_mailbox;
  localparam int W = 16;
  localparam int N = 300;
  logic src_clk = 1'b0, dst_clk = 1'b0, rst_n = 1'b0;
  logic src_put, src_free, dst_valid, dst_take;
  logic [W-1:0] src_data, dst_data;
  logic [W-1:0] sent [N];
  int n_sent = 0, n_recv = 0;
  int checks = 0, failures = 0;
  int dst_edges_since_put = -1, src_edges_since_take = -1;

  cdc_mailbox #(.WIDTH(W)) dut (
    .src_clk, .src_rst_n(rst_n), .src_put, .src_data, .src_free,
    .dst_clk, .dst_rst_n(rst_n), .dst_valid, .dst_data, .dst_take
  );

  always #3.5 src_clk = ~src_clk;
  always #5.5 dst_clk = ~dst_clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog: sent %0d received %0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  always @(posedge src_clk) begin
    if (rst_n) begin
      if (src_put) begin
        n_sent++;
        dst_edges_since_put <= 0;
      end
      if (src_edges_since_take >= 0) begin
        if (src_free) begin
          checks++;
          if (src_edges_since_take > 3) begin
            failures++; $display("FAIL free after %0d src edges", src_edges_since_take);
          end
          src_edges_since_take <= -1;
        end else src_edges_since_take <= src_edges_since_take + 1;
      end
    end
  end
  always @(negedge src_clk) begin
    src_put  <= 1'b0;
    if (rst_n && src_free && n_sent < N && ($urandom % 3) != 0 && src_edges_since_take < 0) begin
      src_data <= sent[n_sent];
      src_put  <= 1'b1;
    end
  end

  // destination
  always @(posedge dst_clk) begin
    if (rst_n) begin
      if (dst_edges_since_put >= 0 && !dst_valid) dst_edges_since_put <= dst_edges_since_put + 1;
      if (dst_valid && dst_edges_since_put >= 0) begin
        checks++;
        if (dst_edges_since_put > 3) begin
          failures++; $display("FAIL valid after %0d dst edges", dst_edges_since_put);
        end
        dst_edges_since_put <= -1;
      end
      if (dst_take) begin
        checks++;
        if (dst_data !== sent[n_recv]) begin
          failures++; $display("FAIL word %0d got %h exp %h", n_recv, dst_data, sent[n_recv]);
        end
        n_recv++;
        src_edges_since_take <= 0;
      end
    end
  end
  always @(negedge dst_clk) dst_take <= rst_n && dst_valid && !dst_take && ($urandom % 2 == 0);

  initial begin
    foreach (sent[i]) sent[i] = W'($urandom);
    src_put = 1'b0; dst_take = 1'b0; src_data = '0;
    #1;
    checks++;
    if (!src_free || dst_valid) begin failures++; $display("FAIL reset state"); end
    #50 rst_n = 1'b1;
    wait (n_recv == N);
    #100;
    checks++;
    if (dst_valid || n_sent != N) begin failures++; $display("FAIL extra word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
