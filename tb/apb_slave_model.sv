// apb_slave_model: behavioural model of up to 16 APB4 peripherals, for
// testbenches only.
//
// Each PSEL line selects a peripheral holding 16 words of storage, addressed
// by PADDR[5:2]. Writes honour PSTRB. Every transfer is given a random number
// of wait states from 0 to max_wait (PREADY low in ENABLE). A transfer whose
// PADDR[11:8] is 4'hF completes with PSLVERR high and changes nothing. The
// model also checks the APB rules it sees and counts wait states.
module apb_slave_model #(
  parameter int unsigned NUM_SLAVES = 16
) (
  input  logic                  pclk,
  input  logic                  presetn,
  input  logic [31:0]           paddr,
  input  logic [NUM_SLAVES-1:0] psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [31:0]           pwdata,
  input  logic [3:0]            pstrb,
  output logic                  pready,
  output logic [31:0]           prdata,
  output logic                  pslverr,
  input  int unsigned           max_wait,
  output int unsigned           wait_states,
  output int unsigned           transfers,
  output int unsigned           protocol_errors
);

  logic [31:0] mem [NUM_SLAVES][16];
  int unsigned wait_left;
  logic        in_enable;
  int          idx;
  logic        err_addr;

  always_comb begin
    idx = 0;
    for (int i = 0; i < NUM_SLAVES; i++) if (psel[i]) idx = i;
  end
  assign err_addr = (paddr[11:8] == 4'hF);
  assign pready   = in_enable && (wait_left == 0);
  assign pslverr  = pready && err_addr;
  assign prdata   = (pready && !pwrite && !err_addr) ? mem[idx][paddr[5:2]] : 32'h0;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      in_enable       <= 1'b0;
      wait_left       <= 0;
      wait_states     <= 0;
      transfers       <= 0;
      protocol_errors <= 0;
      for (int s = 0; s < NUM_SLAVES; s++)
        for (int w = 0; w < 16; w++) mem[s][w] <= 32'h0;
    end else begin
      if (penable && psel == '0) protocol_errors <= protocol_errors + 1;
      if (!$onehot0(psel)) protocol_errors <= protocol_errors + 1;
      if (!pwrite && psel != '0 && pstrb != 4'h0) protocol_errors <= protocol_errors + 1;
      if (psel != '0 && !penable) begin
        // SETUP: choose this transfer's wait states
        in_enable <= 1'b1;
        wait_left <= (max_wait == 0) ? 0 : $urandom_range(max_wait, 0);
      end else if (in_enable) begin
        if (!penable) protocol_errors <= protocol_errors + 1;
        if (wait_left != 0) begin
          wait_left   <= wait_left - 1;
          wait_states <= wait_states + 1;
        end else begin
          in_enable <= 1'b0;
          transfers <= transfers + 1;
          if (pwrite && !err_addr)
            for (int b = 0; b < 4; b++)
              if (pstrb[b]) mem[idx][paddr[5:2]][8*b +: 8] <= pwdata[8*b +: 8];
        end
      end
    end
  end

endmodule
