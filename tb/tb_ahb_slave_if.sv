// tb_ahb_slave_if: runs the AHB front end against the self-checking AHB
// master, with the two mailboxes replaced by a testbench responder that
// plays the APB side: it takes each forwarded request after a random delay,
// applies it to its own memory (using the request's byte strobes) and
// returns OKAY or, for the PSLVERR area, SLVERR. Checks: every completed AHB
// transfer (in the master model), that no invalid command is forwarded, and
// that the responder never sees a request while one is outstanding.
module tb_ahb_slave_if;
  import apb_bridge_pkg::*;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hreadyout, hresp;
  logic [2:0]  hsize;
  logic [3:0]  hprot;
  logic        req_free, req_put, rsp_valid, rsp_take;
  apb_req_t    req;
  apb_rsp_t    rsp;
  logic        done;
  int m_checks, m_failures, n_okay, n_err_invalid, n_err_slave, n_wait;
  int checks = 0, failures = 0;

  logic [31:0] mem [16][16];
  int          delay;
  logic        busy;

  ahb_slave_if dut (
    .hclk, .hresetn, .hsel(1'b1), .haddr, .htrans, .hwrite, .hsize, .hprot, .hwdata,
    .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .req_free, .req_put, .req, .rsp_valid, .rsp, .rsp_take
  );

  ahb_master_model #(.N(400)) u_master (
    .hclk, .hresetn, .haddr, .htrans, .hwrite, .hsize, .hprot, .hwdata,
    .hready(hreadyout), .hresp, .hrdata, .done,
    .checks(m_checks), .failures(m_failures), .n_okay, .n_err_invalid, .n_err_slave,
    .n_wait_cycles(n_wait)
  );

  always #5 hclk = ~hclk;

  // responder standing in for mailboxes + APB side
  always @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      busy <= 1'b0; rsp_valid <= 1'b0; req_free <= 1'b1; delay <= 0; rsp <= '0;
      foreach (mem[i, j]) mem[i][j] <= 32'h0;
    end else begin
      if (req_put) begin
        checks <= checks + 1;
        if (busy || req.addr[31:16] != 16'h4000) begin
          failures <= failures + 1;
          $display("FAIL forwarded %h while busy=%b", req.addr, busy);
        end
        busy     <= 1'b1;
        req_free <= 1'b0;
        delay    <= $urandom % 5;
        rsp.write <= req.write;
        rsp.rdata <= req.write ? 32'h0 : mem[req.addr[15:12]][req.addr[5:2]];
        rsp.resp  <= (req.addr[11:8] == 4'hF) ? RESP_SLVERR : RESP_OKAY;
        if (req.write && req.addr[11:8] != 4'hF)
          for (int b = 0; b < 4; b++)
            if (req.strb[b]) mem[req.addr[15:12]][req.addr[5:2]][8*b +: 8] <= req.wdata[8*b +: 8];
      end else if (busy && !rsp_valid) begin
        if (delay == 0) rsp_valid <= 1'b1;
        else delay <= delay - 1;
      end
      if (rsp_take) begin
        rsp_valid <= 1'b0;
        busy      <= 1'b0;
        req_free  <= 1'b1;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge hclk);
    checks++;
    if (!hreadyout || hresp) begin failures++; $display("FAIL reset outputs"); end
    hresetn = 1'b1;
    wait (done);
    repeat (3) @(posedge hclk);
    checks++;
    if (n_okay == 0 || n_err_invalid == 0 || n_err_slave == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL coverage okay=%0d invalid=%0d slverr=%0d waits=%0d",
               n_okay, n_err_invalid, n_err_slave, n_wait);
    end
    $display("okay=%0d invalid=%0d slverr=%0d wait_cycles=%0d", n_okay, n_err_invalid, n_err_slave, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end
endmodule
