// apb_bridge_top: the two APB bridges side by side.
//
//   u_axi2apb : AXI4-Lite slave -> APB4 master, ACLK and PCLK independent
//               (ports axi_* and the APB port group apb0_*);
//   u_ahb2apb : AHB slave -> APB master, HCLK and PCLK independent
//               (ports ahb_* and the APB port group apb1_*).
// The bridges share no logic at run time; they are built from the same
// clock-crossing and APB state-machine blocks. The system-bus masters and
// the APB peripherals (up to 16 per bridge, one PSEL line each) are outside
// this module. Each APB port group has its own PCLK and PRESETn.
module apb_bridge_top
  import apb_bridge_pkg::*;
#(
  parameter int unsigned       NUM_SLAVES = 16,
  parameter logic [ADDR_W-1:0] BASE_ADDR  = 32'h4000_0000,
  parameter int unsigned       SLOT_LSB   = 12
) (
  // AXI4-Lite slave of the AXI4-Lite to APB bridge
  input  logic                  aclk,
  input  logic                  aresetn,
  input  logic                  axi_awvalid,
  output logic                  axi_awready,
  input  logic [ADDR_W-1:0]     axi_awaddr,
  input  logic [2:0]            axi_awprot,
  input  logic                  axi_wvalid,
  output logic                  axi_wready,
  input  logic [DATA_W-1:0]     axi_wdata,
  input  logic [STRB_W-1:0]     axi_wstrb,
  output logic                  axi_bvalid,
  input  logic                  axi_bready,
  output logic [1:0]            axi_bresp,
  input  logic                  axi_arvalid,
  output logic                  axi_arready,
  input  logic [ADDR_W-1:0]     axi_araddr,
  input  logic [2:0]            axi_arprot,
  output logic                  axi_rvalid,
  input  logic                  axi_rready,
  output logic [DATA_W-1:0]     axi_rdata,
  output logic [1:0]            axi_rresp,
  // APB4 master of the AXI4-Lite to APB bridge
  input  logic                  apb0_pclk,
  input  logic                  apb0_presetn,
  output logic [ADDR_W-1:0]     apb0_paddr,
  output logic [2:0]            apb0_pprot,
  output logic [NUM_SLAVES-1:0] apb0_psel,
  output logic                  apb0_penable,
  output logic                  apb0_pwrite,
  output logic [DATA_W-1:0]     apb0_pwdata,
  output logic [STRB_W-1:0]     apb0_pstrb,
  input  logic                  apb0_pready,
  input  logic [DATA_W-1:0]     apb0_prdata,
  input  logic                  apb0_pslverr,
  output apb_state_e            apb0_state,
  // AHB slave of the AHB to APB bridge
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic                  ahb_hsel,
  input  logic [ADDR_W-1:0]     ahb_haddr,
  input  logic [1:0]            ahb_htrans,
  input  logic                  ahb_hwrite,
  input  logic [2:0]            ahb_hsize,
  input  logic [3:0]            ahb_hprot,
  input  logic [DATA_W-1:0]     ahb_hwdata,
  input  logic                  ahb_hready,
  output logic                  ahb_hreadyout,
  output logic                  ahb_hresp,
  output logic [DATA_W-1:0]     ahb_hrdata,
  // APB master of the AHB to APB bridge
  input  logic                  apb1_pclk,
  input  logic                  apb1_presetn,
  output logic [ADDR_W-1:0]     apb1_paddr,
  output logic [2:0]            apb1_pprot,
  output logic [NUM_SLAVES-1:0] apb1_psel,
  output logic                  apb1_penable,
  output logic                  apb1_pwrite,
  output logic [DATA_W-1:0]     apb1_pwdata,
  output logic [STRB_W-1:0]     apb1_pstrb,
  input  logic                  apb1_pready,
  input  logic [DATA_W-1:0]     apb1_prdata,
  input  logic                  apb1_pslverr,
  output apb_state_e            apb1_state
);

  axi4lite2apb #(
    .NUM_SLAVES(NUM_SLAVES), .BASE_ADDR(BASE_ADDR), .SLOT_LSB(SLOT_LSB)
  ) u_axi2apb (
    .aclk, .aresetn,
    .awvalid(axi_awvalid), .awready(axi_awready), .awaddr(axi_awaddr), .awprot(axi_awprot),
    .wvalid(axi_wvalid), .wready(axi_wready), .wdata(axi_wdata), .wstrb(axi_wstrb),
    .bvalid(axi_bvalid), .bready(axi_bready), .bresp(axi_bresp),
    .arvalid(axi_arvalid), .arready(axi_arready), .araddr(axi_araddr), .arprot(axi_arprot),
    .rvalid(axi_rvalid), .rready(axi_rready), .rdata(axi_rdata), .rresp(axi_rresp),
    .pclk(apb0_pclk), .presetn(apb0_presetn),
    .paddr(apb0_paddr), .pprot(apb0_pprot), .psel(apb0_psel), .penable(apb0_penable),
    .pwrite(apb0_pwrite), .pwdata(apb0_pwdata), .pstrb(apb0_pstrb),
    .pready(apb0_pready), .prdata(apb0_prdata), .pslverr(apb0_pslverr),
    .apb_state(apb0_state)
  );

  ahb2apb #(
    .NUM_SLAVES(NUM_SLAVES), .BASE_ADDR(BASE_ADDR), .SLOT_LSB(SLOT_LSB)
  ) u_ahb2apb (
    .hclk, .hresetn,
    .hsel(ahb_hsel), .haddr(ahb_haddr), .htrans(ahb_htrans), .hwrite(ahb_hwrite),
    .hsize(ahb_hsize), .hprot(ahb_hprot), .hwdata(ahb_hwdata), .hready(ahb_hready),
    .hreadyout(ahb_hreadyout), .hresp(ahb_hresp), .hrdata(ahb_hrdata),
    .pclk(apb1_pclk), .presetn(apb1_presetn),
    .paddr(apb1_paddr), .pprot(apb1_pprot), .psel(apb1_psel), .penable(apb1_penable),
    .pwrite(apb1_pwrite), .pwdata(apb1_pwdata), .pstrb(apb1_pstrb),
    .pready(apb1_pready), .prdata(apb1_prdata), .pslverr(apb1_pslverr),
    .apb_state(apb1_state)
  );

endmodule
