// tb_axi_lite_slave: checks the AXI4-Lite front end against the channel
// rules it must follow, with the two mailboxes replaced by testbench signals.
// Part 1: 3000 random combinations of VALID, READY, mailbox state and
// payload; the handshakes, the request word and the B/R response steering
// are compared with expected values. Part 2: a master that raises a read and
// a write in the same cycle, with the request mailbox then freed once per
// transfer; the read must reach the mailbox first, the write second.
module tb_axi_lite_slave;
  import apb_bridge_pkg::*;

  logic aclk = 1'b0, aresetn = 1'b0;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, araddr, wdata, rdata;
  logic [2:0]  awprot, arprot;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        req_free, req_put, rsp_valid, rsp_take;
  apb_req_t    req;
  apb_rsp_t    rsp;
  int checks = 0, failures = 0;

  axi_lite_slave dut (.*);

  always #5 aclk = ~aclk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    {awvalid, wvalid, bready, arvalid, rready, req_free, rsp_valid} = '0;
    awaddr = '0; araddr = '0; wdata = '0; awprot = '0; arprot = '0; wstrb = '0; rsp = '0;
    repeat (2) @(posedge aclk);
    aresetn = 1'b1;

    // Part 1: random combinations
    for (int i = 0; i < 3000; i++) begin
      logic rd, wr;
      logic hold_rsp;
      @(posedge aclk);
      hold_rsp = rsp_valid && !rsp_take;   // a response stays until taken
      @(negedge aclk);
      {awvalid, wvalid, bready, arvalid, rready, req_free} = 6'($urandom);
      awaddr = $urandom; araddr = $urandom; wdata = $urandom;
      awprot = 3'($urandom); arprot = 3'($urandom); wstrb = 4'($urandom);
      if (!hold_rsp) begin
        rsp_valid = $urandom % 2;
        rsp.rdata = $urandom; rsp.resp = axi_resp_e'($urandom % 4); rsp.write = $urandom % 2;
      end
      #1;
      rd = req_free && arvalid;
      wr = req_free && !arvalid && awvalid && wvalid;
      expect_eq("arready", arready, req_free);
      expect_eq("aw hs", awvalid && awready, wr);
      expect_eq("w hs", wvalid && wready, wr);
      expect_eq("req_put", req_put, rd || wr);
      if (rd) expect_eq("read req", req, {araddr, 1'b0, 32'h0, 4'h0, arprot});
      if (wr) expect_eq("write req", req, {awaddr, 1'b1, wdata, wstrb, awprot});
      expect_eq("bvalid", bvalid, rsp_valid && rsp.write);
      expect_eq("rvalid", rvalid, rsp_valid && !rsp.write);
      if (bvalid) expect_eq("bresp", bresp, rsp.resp);
      if (rvalid) expect_eq("r payload", {rdata, rresp}, {rsp.rdata, rsp.resp});
      expect_eq("rsp_take", rsp_take, rsp_valid && (rsp.write ? bready : rready));
    end

    // Part 2: read and write raised together
    begin : prio
      int order[$];
      @(negedge aclk);
      {bready, rready} = 2'b11;   // let a pending response be taken
      @(negedge aclk);
      {bready, rready, rsp_valid} = '0;
      req_free = 1'b0;
      arvalid = 1'b1; araddr = 32'h4000_2000;
      awvalid = 1'b1; wvalid = 1'b1; awaddr = 32'h4000_1000; wdata = 32'hCAFE_0001;
      repeat (3) @(negedge aclk);
      while (order.size() < 2) begin
        req_free = 1'b1;
        @(posedge aclk);
        if (req_put) order.push_back(req.write);
        if (arvalid && arready) arvalid <= 1'b0;
        if (awvalid && awready) begin awvalid <= 1'b0; wvalid <= 1'b0; end
        @(negedge aclk);
        req_free = 1'b0;
        @(negedge aclk);
      end
      expect_eq("first is read", order[0], 0);
      expect_eq("second is write", order[1], 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
