// tb_axi4lite2apb: end-to-end test of the AXI4-Lite to APB4 bridge.
//
// ACLK has a 10 ns period; PCLK has a random period between 6 and 34 ns
// that changes every half cycle, so the two clocks keep drifting in phase
// and frequency. The self-checking AXI master issues 300 reads and 300
// writes with random response back-pressure; the APB side is the 16
// peripheral model with 0 to 3 random wait states. Checks: every B and R
// response and every read value (in the master model), the APB rules (in the
// peripheral model), and that each mechanism happened: read/write
// competition, PREADY wait states, the HRESP hold state, back-to-back APB
// transfers (ENABLE to SETUP), SLVERR and DECERR.
module tb_axi4lite2apb;
  import apb_bridge_pkg::*;

  logic aclk = 1'b0, pclk = 1'b0, aresetn = 1'b0, presetn = 1'b0;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, araddr, wdata, rdata, paddr, pwdata, prdata;
  logic [2:0]  awprot, arprot, pprot;
  logic [3:0]  wstrb, pstrb;
  logic [1:0]  bresp, rresp;
  logic [15:0] psel;
  logic        penable, pwrite, pready, pslverr, done;
  apb_state_e  apb_state, prev_state;
  int unsigned wait_states, transfers, protocol_errors;
  int m_checks, m_failures, n_conflicts, n_okay, n_slverr, n_decerr;
  int checks = 0, failures = 0, n_hresp = 0, n_b2b = 0;

  axi4lite2apb dut (.*);

  axi_master_model #(.N_RD(300), .N_WR(300)) u_master (
    .aclk, .aresetn, .awvalid, .awready, .awaddr, .awprot, .wvalid, .wready, .wdata, .wstrb,
    .bvalid, .bready, .bresp, .arvalid, .arready, .araddr, .arprot,
    .rvalid, .rready, .rdata, .rresp, .done,
    .checks(m_checks), .failures(m_failures), .n_conflicts, .n_okay, .n_slverr, .n_decerr
  );

  apb_slave_model u_slv (
    .pclk, .presetn, .paddr, .psel, .penable, .pwrite, .pwdata, .pstrb,
    .pready, .prdata, .pslverr, .max_wait(3), .wait_states, .transfers, .protocol_errors
  );

  always #5 aclk = ~aclk;
  always begin
    #($urandom_range(17, 3));
    pclk = ~pclk;
  end

  always @(posedge pclk) begin
    if (apb_state == ST_HRESP && prev_state != ST_HRESP) n_hresp++;
    if (apb_state == ST_SETUP && prev_state == ST_ENABLE) n_b2b++;
    prev_state <= apb_state;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

  initial begin
    #100;
    checks++;
    if (psel !== '0 || penable || bvalid || rvalid) begin failures++; $display("FAIL reset outputs"); end
    aresetn = 1'b1; presetn = 1'b1;
    wait (done);
    #200;
    checks++;
    if (n_conflicts == 0 || wait_states == 0 || n_hresp == 0 || n_b2b == 0 ||
        n_slverr == 0 || n_decerr == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    checks++;
    if (protocol_errors != 0) begin failures++; $display("FAIL %0d APB protocol errors", protocol_errors); end
    $display("conflicts=%0d wait_states=%0d hresp=%0d back_to_back=%0d okay=%0d slverr=%0d decerr=%0d apb_transfers=%0d",
             n_conflicts, wait_states, n_hresp, n_b2b, n_okay, n_slverr, n_decerr, transfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end
endmodule
