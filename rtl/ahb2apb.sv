// ahb2apb: AHB to APB bridge with independent HCLK and PCLK.
//
// Three parts, as the bridge is organised:
//   ahb_slave_if    (HCLK)  "AHB response": checks each AHB command, answers
//                           invalid ones with ERROR and forwards valid ones;
//   cdc_mailbox x2          "control transfer": hands one command at a time
//                           to the APB side and the result back, so only one
//                           request is presented to APB while it is busy;
//   apb_master_fsm  (PCLK)  "APB access": drives PSEL/PENABLE for the read or
//                           write, with PREADY wait states.
// HREADYOUT stays low from the data phase until the APB result is back; with
// HCLK = PCLK and no APB wait states that is 8 HCLK cycles per transfer.
module ahb2apb
  import apb_bridge_pkg::*;
#(
  parameter int unsigned       NUM_SLAVES = 16,
  parameter logic [ADDR_W-1:0] BASE_ADDR  = 32'h4000_0000,
  parameter int unsigned       SLOT_LSB   = 12
) (
  // AHB slave
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic                  hsel,
  input  logic [ADDR_W-1:0]     haddr,
  input  logic [1:0]            htrans,
  input  logic                  hwrite,
  input  logic [2:0]            hsize,
  input  logic [3:0]            hprot,
  input  logic [DATA_W-1:0]     hwdata,
  input  logic                  hready,
  output logic                  hreadyout,
  output logic                  hresp,
  output logic [DATA_W-1:0]     hrdata,
  // APB master
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

  apb_req_t   req_h, req_p;
  apb_rsp_t   rsp_p, rsp_h;
  logic       req_put, req_free, req_valid, req_take;
  logic       rsp_put, rsp_free, rsp_valid, rsp_take;

  ahb_slave_if #(
    .NUM_SLAVES(NUM_SLAVES), .BASE_ADDR(BASE_ADDR), .SLOT_LSB(SLOT_LSB)
  ) u_ahb (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hprot, .hwdata,
    .hready, .hreadyout, .hresp, .hrdata,
    .req_free, .req_put, .req(req_h),
    .rsp_valid, .rsp(rsp_h), .rsp_take
  );

  cdc_mailbox #(.WIDTH(REQ_W)) u_req_cdc (
    .src_clk(hclk), .src_rst_n(hresetn), .src_put(req_put), .src_data(req_h),
    .src_free(req_free),
    .dst_clk(pclk), .dst_rst_n(presetn), .dst_valid(req_valid), .dst_data(req_p),
    .dst_take(req_take)
  );

  cdc_mailbox #(.WIDTH(RSP_W)) u_rsp_cdc (
    .src_clk(pclk), .src_rst_n(presetn), .src_put(rsp_put), .src_data(rsp_p),
    .src_free(rsp_free),
    .dst_clk(hclk), .dst_rst_n(hresetn), .dst_valid(rsp_valid), .dst_data(rsp_h),
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
