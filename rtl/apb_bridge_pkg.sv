// apb_bridge_pkg: types and constants shared by the bus bridges to APB.
//
// Both bridges (AXI4-Lite to APB4 and AHB to APB) move one transfer at a
// time from a system-bus front end, through a clock-domain crossing, to an
// APB master state machine, and move one response back the same way. The
// request and response words that cross the clock boundary are the two
// packed structs below. Address and data are 32 bits wide, as for the
// 32-bit AXI slave and APB master interfaces this design is built for.
package apb_bridge_pkg;

  localparam int ADDR_W     = 32;
  localparam int DATA_W     = 32;
  localparam int STRB_W     = DATA_W / 8;
  // Peripheral select index width: up to 16 APB peripherals.
  localparam int MAX_SLAVES = 16;
  localparam int SEL_IDX_W  = 4;

  // AXI response encoding, also used internally for the APB result.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // One APB transfer request, handed from the system-bus clock domain to
  // the PCLK domain.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              write;
    logic [DATA_W-1:0] wdata;
    logic [STRB_W-1:0] strb;
    logic [2:0]        prot;
  } apb_req_t;

  // One APB transfer result, handed from the PCLK domain back.
  typedef struct packed {
    logic [DATA_W-1:0] rdata;
    axi_resp_e         resp;
    logic              write;
  } apb_rsp_t;

  localparam int REQ_W = $bits(apb_req_t);
  localparam int RSP_W = $bits(apb_rsp_t);

  // States of the APB master state machine.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_SETUP  = 2'd1,
    ST_ENABLE = 2'd2,
    ST_HRESP  = 2'd3
  } apb_state_e;

endpackage
