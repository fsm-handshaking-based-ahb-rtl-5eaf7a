// apb_addr_decoder: peripheral select decode for the APB side.
//
// The APB region starts at BASE_ADDR and is cut into 16 equal windows of
// 2**SLOT_LSB bytes; window i selects APB peripheral i. An address outside
// the region, or in a window at or above NUM_SLAVES, selects nothing and
// raises miss: the bridge answers such a transfer with a decode error
// instead of starting it on APB. At most one select bit is ever set.
// Purely combinational. The window size and base address are this design's
// choice; the limit of 16 peripherals is the design's.
module apb_addr_decoder
  import apb_bridge_pkg::*;
#(
  parameter int unsigned       NUM_SLAVES = 16,
  parameter logic [ADDR_W-1:0] BASE_ADDR  = 32'h4000_0000,
  parameter int unsigned       SLOT_LSB   = 12
) (
  input  logic [ADDR_W-1:0]     addr,
  output logic [NUM_SLAVES-1:0] sel,
  output logic                  miss
);

  localparam int unsigned REGION_LSB = SLOT_LSB + SEL_IDX_W;

  logic [SEL_IDX_W-1:0] idx;
  logic                 in_region;

  assign idx       = addr[SLOT_LSB +: SEL_IDX_W];
  assign in_region = (addr[ADDR_W-1:REGION_LSB] == BASE_ADDR[ADDR_W-1:REGION_LSB]);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < NUM_SLAVES; i++)
      if (in_region && idx == SEL_IDX_W'(i)) sel[i] = 1'b1;
  end

  assign miss = ~|sel;

  initial begin
    assert (NUM_SLAVES >= 1 && NUM_SLAVES <= MAX_SLAVES)
      else $error("apb_addr_decoder: NUM_SLAVES must be 1..16");
  end

endmodule
