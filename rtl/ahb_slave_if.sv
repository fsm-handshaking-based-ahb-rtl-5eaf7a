// ahb_slave_if: AHB slave front end of the AHB to APB bridge (HCLK domain).
//
// Samples an AHB address phase (HSEL, HREADY and a NONSEQ or SEQ HTRANS) and
// checks it. A valid command (address inside the APB map, HSIZE of a byte,
// halfword or word) is forwarded: in the data phase the request, with the
// write data from HWDATA and a byte strobe built from HSIZE and HADDR[1:0],
// is put into the request mailbox and HREADYOUT is held low until the APB
// result comes back through the response mailbox. An OKAY result ends the
// data phase with HREADYOUT high (read data on HRDATA); an APB error (PSLVERR)
// ends it with the two-cycle AHB ERROR response. An invalid command is not
// forwarded at all and gets the two-cycle ERROR response at once.
// IDLE and BUSY transfers get a zero-wait OKAY. One transfer is in flight at
// a time; a new address phase is sampled in the cycle its predecessor ends.
// Forwarding valid commands and answering invalid ones with an error is the
// design's; what counts as invalid and the strobe generation are this
// implementation's choices.
module ahb_slave_if
  import apb_bridge_pkg::*;
#(
  parameter int unsigned       NUM_SLAVES = 16,
  parameter logic [ADDR_W-1:0] BASE_ADDR  = 32'h4000_0000,
  parameter int unsigned       SLOT_LSB   = 12
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  logic [ADDR_W-1:0] haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [3:0]        hprot,
  input  logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  output logic              hreadyout,
  output logic              hresp,
  output logic [DATA_W-1:0] hrdata,
  // request mailbox, source side
  input  logic              req_free,
  output logic              req_put,
  output apb_req_t          req,
  // response mailbox, destination side
  input  logic              rsp_valid,
  input  apb_rsp_t          rsp,
  output logic              rsp_take
);

  typedef enum logic [2:0] {
    A_IDLE = 3'd0,   // no data phase pending
    A_REQ  = 3'd1,   // data phase: forward the request
    A_WAIT = 3'd2,   // data phase: wait for the APB result
    A_ERR1 = 3'd3,   // first ERROR cycle (HREADYOUT low)
    A_ERR2 = 3'd4    // second ERROR cycle (HREADYOUT high)
  } ahb_state_e;

  ahb_state_e           state_q, state_d;
  logic [ADDR_W-1:0]    addr_q;
  logic                 write_q;
  logic [2:0]           size_q;
  logic [2:0]           prot_q;
  logic [DATA_W-1:0]    rdata_q;
  logic                 sample, cmd_ok, dec_miss;
  logic [NUM_SLAVES-1:0] dec_sel;
  logic [STRB_W-1:0]    strb;

  apb_addr_decoder #(
    .NUM_SLAVES(NUM_SLAVES), .BASE_ADDR(BASE_ADDR), .SLOT_LSB(SLOT_LSB)
  ) u_dec (
    .addr(haddr), .sel(dec_sel), .miss(dec_miss)
  );

  assign sample = hsel && hready && htrans[1];
  assign cmd_ok = !dec_miss && (hsize <= 3'd2);

  always_comb begin
    unique case (size_q)
      3'd0:    strb = STRB_W'(1) << addr_q[1:0];
      3'd1:    strb = STRB_W'(3) << {addr_q[1], 1'b0};
      default: strb = '1;
    endcase
  end

  always_comb begin
    req.addr  = addr_q;
    req.write = write_q;
    req.wdata = write_q ? hwdata : '0;
    req.strb  = write_q ? strb : '0;
    req.prot  = prot_q;
  end

  always_comb begin
    state_d   = state_q;
    hreadyout = 1'b1;
    hresp     = 1'b0;
    req_put   = 1'b0;
    rsp_take  = 1'b0;
    unique case (state_q)
      A_IDLE: ;
      A_REQ: begin
        hreadyout = 1'b0;
        if (req_free) begin
          req_put = 1'b1;
          state_d = A_WAIT;
        end
      end
      A_WAIT: begin
        hreadyout = 1'b0;
        if (rsp_valid) begin
          rsp_take = 1'b1;
          if (rsp.resp == RESP_OKAY) hreadyout = 1'b1;
          else                       hresp     = 1'b1;
          state_d = (rsp.resp == RESP_OKAY) ? A_IDLE : A_ERR2;
        end
      end
      A_ERR1: begin
        hreadyout = 1'b0;
        hresp     = 1'b1;
        state_d   = A_ERR2;
      end
      A_ERR2: begin
        hresp   = 1'b1;
        state_d = A_IDLE;
      end
      default: state_d = A_IDLE;
    endcase
    // a new address phase is taken whenever this slave ends a data phase
    if (hreadyout && sample) state_d = cmd_ok ? A_REQ : A_ERR1;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q <= A_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
      size_q  <= '0;
      prot_q  <= '0;
      rdata_q <= '0;
    end else begin
      state_q <= state_d;
      if (hreadyout && sample) begin
        addr_q  <= haddr;
        write_q <= hwrite;
        size_q  <= hsize;
        // APB PPROT: [0] privileged, [1] non-secure (AHB has none), [2] instruction
        prot_q  <= {~hprot[0], 1'b0, hprot[1]};
      end
      if (rsp_take) rdata_q <= rsp.rdata;
    end
  end

  // Read data: straight from the response mailbox in the completing cycle.
  assign hrdata = (state_q == A_WAIT) ? rsp.rdata : rdata_q;

  // AHB rule: an ERROR response is two cycles, HREADYOUT low then high.
  a_err_two_cycle: assert property (@(posedge hclk) disable iff (!hresetn)
                                    (hresp && !hreadyout) |=> (hresp && hreadyout))
    else $error("ahb_slave_if: ERROR response not two cycles");

endmodule
