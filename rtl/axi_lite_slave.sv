// axi_lite_slave: AXI4-Lite slave front end of the AXI4-Lite to APB bridge
// (ACLK domain).
//
// Request side: a read address (AR) or a write address plus write data
// (AW and W together) becomes one request word in the request mailbox.
// The channels are accepted only while the mailbox is free. ARREADY follows
// the mailbox state alone; AWREADY and WREADY are raised together and only
// when both AWVALID and WVALID are high and no read is waiting, so a read
// that is valid in the same cycle as a write always goes to APB first.
// Response side: the word in the response mailbox is shown on the B channel
// (writes) or the R channel (reads) until the master takes it with BREADY or
// RREADY; then the mailbox entry is released. Responses come back in the
// order the requests were accepted.
// VALID/READY follow the AXI rule: a transfer happens on the rising ACLK edge
// where both are high. The read priority is the design's; waiting for both
// AW and W before accepting either is this implementation's choice.
module axi_lite_slave
  import apb_bridge_pkg::*;
(
  input  logic              aclk,
  input  logic              aresetn,
  // write address channel
  input  logic              awvalid,
  output logic              awready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [2:0]        awprot,
  // write data channel
  input  logic              wvalid,
  output logic              wready,
  input  logic [DATA_W-1:0] wdata,
  input  logic [STRB_W-1:0] wstrb,
  // write response channel
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  // read address channel
  input  logic              arvalid,
  output logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [2:0]        arprot,
  // read data channel
  output logic              rvalid,
  input  logic              rready,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  // request mailbox, source side
  input  logic              req_free,
  output logic              req_put,
  output apb_req_t          req,
  // response mailbox, destination side
  input  logic              rsp_valid,
  input  apb_rsp_t          rsp,
  output logic              rsp_take
);

  logic rd_fire, wr_fire;

  assign arready = req_free;
  assign awready = req_free && !arvalid && wvalid;
  assign wready  = req_free && !arvalid && awvalid;

  assign rd_fire = arvalid && arready;
  assign wr_fire = awvalid && awready;   // implies wvalid && wready
  assign req_put = rd_fire || wr_fire;

  always_comb begin
    if (rd_fire) begin
      req.addr  = araddr;
      req.write = 1'b0;
      req.wdata = '0;
      req.strb  = '0;
      req.prot  = arprot;
    end else begin
      req.addr  = awaddr;
      req.write = 1'b1;
      req.wdata = wdata;
      req.strb  = wstrb;
      req.prot  = awprot;
    end
  end

  assign bvalid   = rsp_valid && rsp.write;
  assign bresp    = rsp.resp;
  assign rvalid   = rsp_valid && !rsp.write;
  assign rdata    = rsp.rdata;
  assign rresp    = rsp.resp;
  assign rsp_take = (bvalid && bready) || (rvalid && rready);

  // AXI rule: once VALID is high it stays high, with stable payload, until READY.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  (bvalid && !bready) |=> (bvalid && $stable(bresp)))
    else $error("axi_lite_slave: BVALID dropped before BREADY");
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  (rvalid && !rready) |=> (rvalid && $stable(rdata) && $stable(rresp)))
    else $error("axi_lite_slave: RVALID dropped before RREADY");
  a_aw_w_together: assert property (@(posedge aclk) disable iff (!aresetn)
                                    (awvalid && awready) == (wvalid && wready))
    else $error("axi_lite_slave: AW and W not accepted together");

endmodule
