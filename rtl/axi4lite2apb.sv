// axi4lite2apb: AXI4-Lite slave to APB4 master bridge with independent
// clocks.
//
// The AXI side runs on ACLK/ARESETn, the APB side on PCLK/PRESETn; the two
// clocks may have any frequency and phase. Structure:
//   axi_lite_slave  (ACLK)  accepts AR, or AW+W, with reads first, and
//                           returns B and R responses;
//   cdc_mailbox x2          carries one request to PCLK and one response
//                           back, each over a toggle handshake with
//                           two-flop synchronisers;
//   apb_master_fsm  (PCLK)  decodes the address to one of NUM_SLAVES PSEL
//                           lines and runs the IDLE/SETUP/ENABLE/HRESP
//                           state machine, with PREADY wait states.
// Responses: OKAY; SLVERR when the peripheral raises PSLVERR; DECERR when no
// peripheral is mapped at the address (nothing is started on APB then).
// Up to three transfers can be in the bridge at once: one in the request
// mailbox, one on APB, one in the response mailbox. With ACLK = PCLK and no
// wait states, RVALID or BVALID rises about 8 cycles after the AR or AW
// handshake (two synchroniser delays, SETUP and ENABLE on APB, and the
// mailbox register stages); each PREADY wait state adds one PCLK.
module axi4lite2apb
  import apb_bridge_pkg::*;
#(
  parameter int unsigned       NUM_SLAVES = 16,
  parameter logic [ADDR_W-1:0] BASE_ADDR  = 32'h4000_0000,
  parameter int unsigned       SLOT_LSB   = 12
) (
  // AXI4-Lite slave
  input  logic                  aclk,
  input  logic                  aresetn,
  input  logic                  awvalid,
  output logic                  awready,
  input  logic [ADDR_W-1:0]     awaddr,
  input  logic [2:0]            awprot,
  input  logic                  wvalid,
  output logic                  wready,
  input  logic [DATA_W-1:0]     wdata,
  input  logic [STRB_W-1:0]     wstrb,
  output logic                  bvalid,
  input  logic                  bready,
  output logic [1:0]            bresp,
  input  logic                  arvalid,
  output logic                  arready,
  input  logic [ADDR_W-1:0]     araddr,
  input  logic [2:0]            arprot,
  output logic                  rvalid,
  input  logic                  rready,
  output logic [DATA_W-1:0]     rdata,
  output logic [1:0]            rresp,
  // APB4 master
  input  logic                  pclk,
  input  logic                  presetn,
  output logic [ADDR_W-1:0]     paddr,
  output logic [2:0]            pprot,
  output logic [NUM_SLAVES-1:0] psel,
  output logic                  penable,
  output logic                  pwrite,
  output logic [DATA_W-1:0]     pwdata,
  output logic [STRB_W-1:0]     pstrb,
  input  logic                  pready,
  input  logic [DATA_W-1:0]     prdata,
  input  logic                  pslverr,
  // APB state machine state, for status and observation
  output apb_state_e            apb_state
);

  apb_req_t   req_a, req_p;
  apb_rsp_t   rsp_p, rsp_a;
  logic       req_put, req_free, req_valid, req_take;
  logic       rsp_put, rsp_free, rsp_valid, rsp_take;

  axi_lite_slave u_axi (
    .aclk, .aresetn,
    .awvalid, .awready, .awaddr, .awprot,
    .wvalid, .wready, .wdata, .wstrb,
    .bvalid, .bready, .bresp,
    .arvalid, .arready, .araddr, .arprot,
    .rvalid, .rready, .rdata, .rresp,
    .req_free, .req_put, .req(req_a),
    .rsp_valid, .rsp(rsp_a), .rsp_take
  );

  cdc_mailbox #(.WIDTH(REQ_W)) u_req_cdc (
    .src_clk(aclk), .src_rst_n(aresetn), .src_put(req_put), .src_data(req_a),
    .src_free(req_free),
    .dst_clk(pclk), .dst_rst_n(presetn), .dst_valid(req_valid), .dst_data(req_p),
    .dst_take(req_take)
  );

  cdc_mailbox #(.WIDTH(RSP_W)) u_rsp_cdc (
    .src_clk(pclk), .src_rst_n(presetn), .src_put(rsp_put), .src_data(rsp_p),
    .src_free(rsp_free),
    .dst_clk(aclk), .dst_rst_n(aresetn), .dst_valid(rsp_valid), .dst_data(rsp_a),
    .dst_take(rsp_take)
  );

  apb_master_fsm #(
    .NUM_SLAVES(NUM_SLAVES), .BASE_ADDR(BASE_ADDR), .SLOT_LSB(SLOT_LSB)
  ) u_apb (
    .pclk, .presetn,
    .req_valid, .req(req_p), .req_take,
    .rsp_free, .rsp_put, .rsp(rsp_p),
    .paddr, .pprot, .psel, .penable, .pwrite, .pwdata, .pstrb,
    .pready, .prdata, .pslverr,
    .state(apb_state)
  );

endmodule
