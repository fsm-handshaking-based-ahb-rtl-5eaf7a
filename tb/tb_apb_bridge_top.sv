// tb_apb_bridge_top: end-to-end test of both bridges in the top, at the
// default parameters (16 peripherals per bridge, 32-bit buses).
//
// Clocks: ACLK 10 ns, HCLK 8 ns, the AXI bridge's PCLK with a random period
// between 6 and 34 ns changing every half cycle, the AHB bridge's PCLK
// 26 ns. The AXI4-Lite master issues 250 reads and 250 writes, the AHB master
// 400 transfers, at the same time; each APB port group drives its own
// 16-peripheral model with 0 to 3 wait states. Every response and read value
// is checked by the master models, the APB rules by the peripheral models.
// Each mechanism must happen at least once: on both bridges PREADY wait
// states and errors from PSLVERR; on the AXI bridge read/write competition,
// back-to-back APB transfers, the HRESP hold state and DECERR; on the AHB
// bridge the ERROR response for an invalid command. (The AHB bridge holds
// HREADYOUT low until each transfer is answered, so it never has a second
// request ready for a back-to-back APB transfer.)
module tb_apb_bridge_top;
  import apb_bridge_pkg::*;

  logic aclk = 1'b0, hclk = 1'b0, pclk0 = 1'b0, pclk1 = 1'b0, rst_n = 1'b0;
  // AXI side
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, araddr, wdata, rdata;
  logic [2:0]  awprot, arprot;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  // AHB side
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic [2:0]  hsize;
  logic [3:0]  hprot;
  logic        hwrite, hreadyout, hresp;
  // APB sides
  logic [31:0] paddr0, pwdata0, prdata0, paddr1, pwdata1, prdata1;
  logic [2:0]  pprot0, pprot1;
  logic [3:0]  pstrb0, pstrb1;
  logic [15:0] psel0, psel1;
  logic        penable0, pwrite0, pready0, pslverr0, penable1, pwrite1, pready1, pslverr1;
  apb_state_e  state0, state1, prev0, prev1;

  logic axi_done, ahb_done;
  int ax_checks, ax_failures, n_conflicts, ax_okay, ax_slverr, ax_decerr;
  int ah_checks, ah_failures, ah_okay, ah_invalid, ah_slverr, ah_wait;
  int unsigned ws0, tr0, pe0, ws1, tr1, pe1;
  int checks = 0, failures = 0;
  int hresp0 = 0, hresp1 = 0, b2b0 = 0, b2b1 = 0, decerr1 = 0;

  apb_bridge_top dut (
    .aclk, .aresetn(rst_n),
    .axi_awvalid(awvalid), .axi_awready(awready), .axi_awaddr(awaddr), .axi_awprot(awprot),
    .axi_wvalid(wvalid), .axi_wready(wready), .axi_wdata(wdata), .axi_wstrb(wstrb),
    .axi_bvalid(bvalid), .axi_bready(bready), .axi_bresp(bresp),
    .axi_arvalid(arvalid), .axi_arready(arready), .axi_araddr(araddr), .axi_arprot(arprot),
    .axi_rvalid(rvalid), .axi_rready(rready), .axi_rdata(rdata), .axi_rresp(rresp),
    .apb0_pclk(pclk0), .apb0_presetn(rst_n),
    .apb0_paddr(paddr0), .apb0_pprot(pprot0), .apb0_psel(psel0), .apb0_penable(penable0),
    .apb0_pwrite(pwrite0), .apb0_pwdata(pwdata0), .apb0_pstrb(pstrb0),
    .apb0_pready(pready0), .apb0_prdata(prdata0), .apb0_pslverr(pslverr0), .apb0_state(state0),
    .hclk, .hresetn(rst_n),
    .ahb_hsel(1'b1), .ahb_haddr(haddr), .ahb_htrans(htrans), .ahb_hwrite(hwrite),
    .ahb_hsize(hsize), .ahb_hprot(hprot), .ahb_hwdata(hwdata), .ahb_hready(hreadyout),
    .ahb_hreadyout(hreadyout), .ahb_hresp(hresp), .ahb_hrdata(hrdata),
    .apb1_pclk(pclk1), .apb1_presetn(rst_n),
    .apb1_paddr(paddr1), .apb1_pprot(pprot1), .apb1_psel(psel1), .apb1_penable(penable1),
    .apb1_pwrite(pwrite1), .apb1_pwdata(pwdata1), .apb1_pstrb(pstrb1),
    .apb1_pready(pready1), .apb1_prdata(prdata1), .apb1_pslverr(pslverr1), .apb1_state(state1)
  );

  axi_master_model #(.N_RD(250), .N_WR(250)) u_axi_master (
    .aclk, .aresetn(rst_n), .awvalid, .awready, .awaddr, .awprot, .wvalid, .wready, .wdata, .wstrb,
    .bvalid, .bready, .bresp, .arvalid, .arready, .araddr, .arprot,
    .rvalid, .rready, .rdata, .rresp, .done(axi_done),
    .checks(ax_checks), .failures(ax_failures), .n_conflicts,
    .n_okay(ax_okay), .n_slverr(ax_slverr), .n_decerr(ax_decerr)
  );

  ahb_master_model #(.N(400)) u_ahb_master (
    .hclk, .hresetn(rst_n), .haddr, .htrans, .hwrite, .hsize, .hprot, .hwdata,
    .hready(hreadyout), .hresp, .hrdata, .done(ahb_done),
    .checks(ah_checks), .failures(ah_failures), .n_okay(ah_okay), .n_err_invalid(ah_invalid),
    .n_err_slave(ah_slverr), .n_wait_cycles(ah_wait)
  );

  apb_slave_model u_slv0 (
    .pclk(pclk0), .presetn(rst_n), .paddr(paddr0), .psel(psel0), .penable(penable0),
    .pwrite(pwrite0), .pwdata(pwdata0), .pstrb(pstrb0), .pready(pready0), .prdata(prdata0),
    .pslverr(pslverr0), .max_wait(3), .wait_states(ws0), .transfers(tr0), .protocol_errors(pe0)
  );

  apb_slave_model u_slv1 (
    .pclk(pclk1), .presetn(rst_n), .paddr(paddr1), .psel(psel1), .penable(penable1),
    .pwrite(pwrite1), .pwdata(pwdata1), .pstrb(pstrb1), .pready(pready1), .prdata(prdata1),
    .pslverr(pslverr1), .max_wait(3), .wait_states(ws1), .transfers(tr1), .protocol_errors(pe1)
  );

  always #5 aclk = ~aclk;
  always #4 hclk = ~hclk;
  always #13 pclk1 = ~pclk1;
  always begin
    #($urandom_range(17, 3));
    pclk0 = ~pclk0;
  end

  always @(posedge pclk0) begin
    if (state0 == ST_HRESP && prev0 != ST_HRESP) hresp0++;
    if (state0 == ST_SETUP && prev0 == ST_ENABLE) b2b0++;
    prev0 <= state0;
  end
  always @(posedge pclk1) begin
    if (state1 == ST_HRESP && prev1 != ST_HRESP) hresp1++;
    if (state1 == ST_SETUP && prev1 == ST_ENABLE) b2b1++;
    // a command with no peripheral behind it never selects one
    if (state1 == ST_ENABLE && psel1 == '0) decerr1++;
    prev1 <= state1;
  end

  initial begin
    #8000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ax_checks + ah_checks,
             failures + ax_failures + ah_failures);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    #100;
    checks++;
    if (psel0 !== '0 || psel1 !== '0 || bvalid || rvalid || !hreadyout) begin
      failures++; $display("FAIL reset outputs");
    end
    rst_n = 1'b1;
    wait (axi_done && ahb_done);
    #300;
    need("AXI read/write competition", n_conflicts);
    need("AXI-side PREADY wait state", ws0);
    need("AXI-side back-to-back APB transfer", b2b0);
    need("AXI-side HRESP hold", hresp0);
    need("AXI SLVERR", ax_slverr);
    need("AXI DECERR", ax_decerr);
    need("AHB-side PREADY wait state", ws1);
    need("AHB ERROR for invalid command", ah_invalid);
    need("AHB ERROR from PSLVERR", ah_slverr);
    checks++;
    // the AHB side stops invalid commands before APB, so its APB FSM never sees a decode miss
    if (decerr1 != 0) begin failures++; $display("FAIL AHB bridge forwarded an unmapped address"); end
    checks++;
    if (pe0 != 0 || pe1 != 0) begin failures++; $display("FAIL APB protocol errors %0d %0d", pe0, pe1); end
    $display("AXI: conflicts=%0d waits=%0d b2b=%0d hresp=%0d okay=%0d slverr=%0d decerr=%0d",
             n_conflicts, ws0, b2b0, hresp0, ax_okay, ax_slverr, ax_decerr);
    $display("AHB: waits=%0d b2b=%0d hresp=%0d okay=%0d err_invalid=%0d err_pslverr=%0d",
             ws1, b2b1, hresp1, ah_okay, ah_invalid, ah_slverr);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ax_checks + ah_checks,
             failures + ax_failures + ah_failures);
    $finish;
  end
endmodule
