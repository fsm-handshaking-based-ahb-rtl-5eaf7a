// tb_typical_transfers: a directed run of typical read and write transfers
// through both bridges of the top, at default parameters.
//
// Six writes go to consecutive words 1 to 6 of peripheral 0 with the data
// values 32'h1234, 32'hABCD, 32'hEF12, 32'hA452, 32'h2345, 32'h29FF, then
// the six words are read back, first through the AXI4-Lite bridge and then
// through the AHB bridge (each bridge has its own peripherals). Finally the
// AXI master raises a read and a write in the same cycle; the APB bus must
// show the read first and the write second, and the read must return the
// value from before the write. Checks the data on the APB bus and on the
// system bus.
module tb_typical_transfers;
  import apb_bridge_pkg::*;

  logic aclk = 1'b0, hclk = 1'b0, pclk0 = 1'b0, pclk1 = 1'b0, rst_n = 1'b0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata;
  logic [3:0]  wstrb = 4'hF;
  logic [1:0]  bresp, rresp;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0]  htrans = 0;
  logic        hwrite = 0, hreadyout, hresp;
  logic [31:0] paddr0, pwdata0, prdata0, paddr1, pwdata1, prdata1;
  logic [2:0]  pprot0, pprot1;
  logic [3:0]  pstrb0, pstrb1;
  logic [15:0] psel0, psel1;
  logic        penable0, pwrite0, pready0, pslverr0, penable1, pwrite1, pready1, pslverr1;
  apb_state_e  state0, state1;
  int unsigned ws0, tr0, pe0, ws1, tr1, pe1;
  int checks = 0, failures = 0;
  logic [31:0] vals [6] = '{32'h1234, 32'hABCD, 32'hEF12, 32'hA452, 32'h2345, 32'h29FF};
  logic        apb0_dir [$];
  logic [31:0] apb0_addr [$];

  apb_bridge_top dut (
    .aclk, .aresetn(rst_n),
    .axi_awvalid(awvalid), .axi_awready(awready), .axi_awaddr(awaddr), .axi_awprot(3'b000),
    .axi_wvalid(wvalid), .axi_wready(wready), .axi_wdata(wdata), .axi_wstrb(wstrb),
    .axi_bvalid(bvalid), .axi_bready(bready), .axi_bresp(bresp),
    .axi_arvalid(arvalid), .axi_arready(arready), .axi_araddr(araddr), .axi_arprot(3'b000),
    .axi_rvalid(rvalid), .axi_rready(rready), .axi_rdata(rdata), .axi_rresp(rresp),
    .apb0_pclk(pclk0), .apb0_presetn(rst_n),
    .apb0_paddr(paddr0), .apb0_pprot(pprot0), .apb0_psel(psel0), .apb0_penable(penable0),
    .apb0_pwrite(pwrite0), .apb0_pwdata(pwdata0), .apb0_pstrb(pstrb0),
    .apb0_pready(pready0), .apb0_prdata(prdata0), .apb0_pslverr(pslverr0), .apb0_state(state0),
    .hclk, .hresetn(rst_n),
    .ahb_hsel(1'b1), .ahb_haddr(haddr), .ahb_htrans(htrans), .ahb_hwrite(hwrite),
    .ahb_hsize(3'd2), .ahb_hprot(4'b0011), .ahb_hwdata(hwdata), .ahb_hready(hreadyout),
    .ahb_hreadyout(hreadyout), .ahb_hresp(hresp), .ahb_hrdata(hrdata),
    .apb1_pclk(pclk1), .apb1_presetn(rst_n),
    .apb1_paddr(paddr1), .apb1_pprot(pprot1), .apb1_psel(psel1), .apb1_penable(penable1),
    .apb1_pwrite(pwrite1), .apb1_pwdata(pwdata1), .apb1_pstrb(pstrb1),
    .apb1_pready(pready1), .apb1_prdata(prdata1), .apb1_pslverr(pslverr1), .apb1_state(state1)
  );

  apb_slave_model u_slv0 (
    .pclk(pclk0), .presetn(rst_n), .paddr(paddr0), .psel(psel0), .penable(penable0),
    .pwrite(pwrite0), .pwdata(pwdata0), .pstrb(pstrb0), .pready(pready0), .prdata(prdata0),
    .pslverr(pslverr0), .max_wait(1), .wait_states(ws0), .transfers(tr0), .protocol_errors(pe0)
  );
  apb_slave_model u_slv1 (
    .pclk(pclk1), .presetn(rst_n), .paddr(paddr1), .psel(psel1), .penable(penable1),
    .pwrite(pwrite1), .pwdata(pwdata1), .pstrb(pstrb1), .pready(pready1), .prdata(prdata1),
    .pslverr(pslverr1), .max_wait(1), .wait_states(ws1), .transfers(tr1), .protocol_errors(pe1)
  );

  always #5 aclk = ~aclk;
  always #5 hclk = ~hclk;
  always #15 pclk0 = ~pclk0;
  always #15 pclk1 = ~pclk1;

  // record the APB transfers of the AXI bridge as they complete
  always @(posedge pclk0) if (penable0 && pready0) begin
    apb0_dir.push_back(pwrite0);
    apb0_addr.push_back(paddr0);
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic axi_write(logic [31:0] a, logic [31:0] d);
    @(negedge aclk); awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    do @(posedge aclk); while (!(awready && wready));
    @(negedge aclk); awvalid = 0; wvalid = 0; bready = 1;
    do @(posedge aclk); while (!bvalid);
    check("AXI bresp", 32'(bresp), 32'(RESP_OKAY));
    @(negedge aclk); bready = 0;
  endtask

  task automatic axi_read(logic [31:0] a, output logic [31:0] d);
    @(negedge aclk); arvalid = 1; araddr = a;
    do @(posedge aclk); while (!arready);
    @(negedge aclk); arvalid = 0; rready = 1;
    do @(posedge aclk); while (!rvalid);
    d = rdata;
    check("AXI rresp", 32'(rresp), 32'(RESP_OKAY));
    @(negedge aclk); rready = 0;
  endtask

  // one AHB single transfer: address phase, then data phase until HREADYOUT
  task automatic ahb_xfer(logic [31:0] a, logic w, logic [31:0] d, output logic [31:0] r);
    @(negedge hclk); htrans = 2'b10; haddr = a; hwrite = w;
    @(posedge hclk);
    @(negedge hclk); htrans = 2'b00; hwdata = w ? d : 32'h0;
    do @(posedge hclk); while (!hreadyout);
    r = hrdata;
    check("AHB hresp", 32'(hresp), 0);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, d2;
    #100 rst_n = 1'b1;
    // AXI4-Lite bridge: writes, then reads
    for (int i = 0; i < 6; i++) axi_write(32'h4000_0000 + 32'((i + 1) * 4), vals[i]);
    for (int i = 0; i < 6; i++) begin
      axi_read(32'h4000_0000 + 32'((i + 1) * 4), d);
      check("AXI read back", d, vals[i]);
    end
    // AHB bridge: writes, then reads
    for (int i = 0; i < 6; i++) ahb_xfer(32'h4000_0000 + 32'((i + 1) * 4), 1'b1, vals[i], d);
    for (int i = 0; i < 6; i++) begin
      ahb_xfer(32'h4000_0000 + 32'((i + 1) * 4), 1'b0, 32'h0, d);
      check("AHB read back", d, vals[i]);
    end
    // read and write raised together on AXI, to the same word
    apb0_dir.delete(); apb0_addr.delete();
    @(negedge aclk);
    arvalid = 1; araddr = 32'h4000_0008;
    awvalid = 1; wvalid = 1; awaddr = 32'h4000_0008; wdata = 32'h5555_AAAA;
    rready = 1; bready = 1;
    fork
      begin
        do @(posedge aclk); while (!arready);
        @(negedge aclk) arvalid = 0;
      end
      begin
        do @(posedge aclk); while (!(awready && wready));
        @(negedge aclk) begin awvalid = 0; wvalid = 0; end
      end
      begin
        do @(posedge aclk); while (!rvalid);
        d = rdata;
      end
      begin
        do @(posedge aclk); while (!bvalid);
      end
    join
    @(negedge aclk); rready = 0; bready = 0;
    check("read returns the value before the write", d, vals[1]);
    axi_read(32'h4000_0008, d2);
    check("write landed after the read", d2, 32'h5555_AAAA);
    checks++;
    if (apb0_dir.size() < 2 || apb0_dir[0] !== 1'b0 || apb0_dir[1] !== 1'b1) begin
      failures++; $display("FAIL APB order was not read then write");
    end
    checks++;
    if (pe0 != 0 || pe1 != 0) begin failures++; $display("FAIL APB protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
