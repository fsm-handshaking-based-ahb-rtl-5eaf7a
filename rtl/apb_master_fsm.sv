// apb_master_fsm: APB master state machine of the bridge (PCLK domain).
//
// Takes one request at a time from the request mailbox and runs it as an
// APB transfer, then hands the result to the response mailbox.
//   IDLE   : no transfer. A waiting request is taken and the FSM goes to SETUP.
//   SETUP  : PSEL of the decoded peripheral high, PENABLE low (one PCLK).
//   ENABLE : PENABLE high; stays here while PREADY is low (wait states).
//            When PREADY is high the result is captured. If the response
//            mailbox is free the result is posted at once and the FSM goes
//            straight to SETUP (another request waiting) or IDLE.
//            Otherwise it goes to HRESP.
//   HRESP  : the system-bus side has not yet taken the previous response;
//            the result is held here, the APB is idle, and when the mailbox
//            frees up the result is posted and the FSM leaves for SETUP or
//            IDLE as above.
// The four state names and the edges IDLE->SETUP (on a valid request),
// SETUP->ENABLE and ENABLE->HRESP are the design's; the conditions on the
// other edges are this implementation's.
// Responses: OKAY, SLVERR when the peripheral raises PSLVERR, DECERR when the
// address selects no peripheral. A decode miss runs through SETUP and ENABLE
// with no PSEL and no PENABLE on the bus and ends in ENABLE at once.
// PSTRB is driven only for writes (zero for reads, as APB4 requires).
// A transfer takes 2 PCLK cycles plus one per wait state; back-to-back
// transfers need no IDLE cycle between them.
module apb_master_fsm
  import apb_bridge_pkg::*;
#(
  parameter int unsigned       NUM_SLAVES = 16,
  parameter logic [ADDR_W-1:0] BASE_ADDR  = 32'h4000_0000,
  parameter int unsigned       SLOT_LSB   = 12
) (
  input  logic                  pclk,
  input  logic                  presetn,
  // request mailbox, destination side
  input  logic                  req_valid,
  input  apb_req_t              req,
  output logic                  req_take,
  // response mailbox, source side
  input  logic                  rsp_free,
  output logic                  rsp_put,
  output apb_rsp_t              rsp,
  // APB4 master
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
  // state, for observation
  output apb_state_e            state
);

  apb_state_e            state_q, state_d;
  apb_req_t              cur_q;
  logic [NUM_SLAVES-1:0] sel_q, dec_sel;
  logic                  miss_q, dec_miss;
  apb_rsp_t              held_q, done_rsp;
  logic                  complete;

  apb_addr_decoder #(
    .NUM_SLAVES(NUM_SLAVES), .BASE_ADDR(BASE_ADDR), .SLOT_LSB(SLOT_LSB)
  ) u_dec (
    .addr(req.addr), .sel(dec_sel), .miss(dec_miss)
  );

  assign complete = (state_q == ST_ENABLE) && (miss_q || pready);

  always_comb begin
    done_rsp.write = cur_q.write;
    done_rsp.rdata = (!miss_q && !cur_q.write) ? prdata : '0;
    if (miss_q)       done_rsp.resp = RESP_DECERR;
    else if (pslverr) done_rsp.resp = RESP_SLVERR;
    else              done_rsp.resp = RESP_OKAY;
  end

  always_comb begin
    state_d  = state_q;
    req_take = 1'b0;
    rsp_put  = 1'b0;
    rsp      = done_rsp;
    unique case (state_q)
      ST_IDLE: begin
        if (req_valid) begin
          req_take = 1'b1;
          state_d  = ST_SETUP;
        end
      end
      ST_SETUP: state_d = ST_ENABLE;
      ST_ENABLE: begin
        if (complete) begin
          if (rsp_free) begin
            rsp_put = 1'b1;
            if (req_valid) begin
              req_take = 1'b1;
              state_d  = ST_SETUP;
            end else begin
              state_d  = ST_IDLE;
            end
          end else begin
            state_d = ST_HRESP;
          end
        end
      end
      ST_HRESP: begin
        rsp = held_q;
        if (rsp_free) begin
          rsp_put = 1'b1;
          if (req_valid) begin
            req_take = 1'b1;
            state_d  = ST_SETUP;
          end else begin
            state_d  = ST_IDLE;
          end
        end
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state_q <= ST_IDLE;
      cur_q   <= '0;
      sel_q   <= '0;
      miss_q  <= 1'b1;
      held_q  <= '0;
    end else begin
      state_q <= state_d;
      if (req_take) begin
        cur_q  <= req;
        sel_q  <= dec_sel;
        miss_q <= dec_miss;
      end
      if (complete) held_q <= done_rsp;
    end
  end

  assign state   = state_q;
  assign paddr   = cur_q.addr;
  assign pprot   = cur_q.prot;
  assign pwrite  = cur_q.write;
  assign pwdata  = cur_q.wdata;
  assign pstrb   = cur_q.write ? cur_q.strb : '0;
  assign psel    = (state_q == ST_SETUP || state_q == ST_ENABLE) ? sel_q : '0;
  assign penable = (state_q == ST_ENABLE) && !miss_q;

  // APB protocol rules
  a_enable_needs_sel: assert property (@(posedge pclk) disable iff (!presetn)
                                       penable |-> (psel != '0))
    else $error("apb_master_fsm: PENABLE without PSEL");
  a_onehot_sel: assert property (@(posedge pclk) disable iff (!presetn)
                                 $onehot0(psel))
    else $error("apb_master_fsm: more than one PSEL");
  a_setup_then_enable: assert property (@(posedge pclk) disable iff (!presetn)
                                        (psel != '0 && !penable) |=> penable)
    else $error("apb_master_fsm: SETUP not followed by ENABLE");
  a_stable_in_enable: assert property (@(posedge pclk) disable iff (!presetn)
                                       (penable && !pready) |=>
                                       ($stable(paddr) && $stable(pwrite) && $stable(pwdata) && $stable(psel)))
    else $error("apb_master_fsm: transfer changed during a wait state");

endmodule
