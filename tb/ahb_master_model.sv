// ahb_master_model: self-checking AHB master for testbenches.
//
// Issues N random single transfers (NONSEQ, pipelined: the next address
// phase is driven in the cycle the previous data phase ends), with random
// IDLE cycles between them. Transfer mix: reads and writes of bytes,
// halfwords and words to 16 peripheral windows at 32'h4000_0000 + i*4 KB,
// some to the PSLVERR area (address bits [11:8] = 4'hF), some outside the
// APB region, some with an unsupported HSIZE of 64 bits.
// It keeps its own copy of peripheral memory and checks every completed
// data phase: ERROR (two cycles) for an invalid command or a PSLVERR
// address, OKAY otherwise, and read data against its copy. It counts each
// kind of outcome and reports done when all N transfers have ended.
module ahb_master_model #(
  parameter int unsigned N = 200
) (
  input  logic        hclk,
  input  logic        hresetn,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [3:0]  hprot,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic        hresp,
  input  logic [31:0] hrdata,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          n_okay,
  output int          n_err_invalid,
  output int          n_err_slave,
  output int          n_wait_cycles
);

  typedef struct packed {
    logic [31:0] addr;
    logic        write;
    logic [2:0]  size;
    logic [31:0] wdata;
  } xfer_t;

  logic [31:0] ref_mem [16][16];
  xfer_t ap, dp;           // transfer in address phase / data phase
  logic  ap_valid, dp_valid;
  int    issued, completed;
  logic  err_first;

  function automatic xfer_t rand_xfer();
    xfer_t x;
    int k = $urandom % 20;
    x.write = $urandom % 2;
    x.size  = 3'($urandom % 3);
    x.wdata = $urandom;
    x.addr  = 32'h4000_0000 | (32'($urandom % 16) << 12) | (32'($urandom % 16) << 2);
    if (x.size == 3'd0) x.addr[1:0] = 2'($urandom);
    if (x.size == 3'd1) x.addr[1]   = 1'($urandom);
    if (k == 0) x.addr[31:28] = 4'h6;          // outside the APB region
    if (k == 1) x.size = 3'd3;                 // 64-bit: not supported
    if (k == 2 || k == 3) x.addr[11:8] = 4'hF; // peripheral answers PSLVERR
    return x;
  endfunction

  function automatic logic invalid(xfer_t x);
    return (x.addr[31:16] != 16'h4000) || (x.size > 3'd2);
  endfunction

  function automatic logic [3:0] lanes(xfer_t x);
    case (x.size)
      3'd0:    return 4'b0001 << x.addr[1:0];
      3'd1:    return x.addr[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

  always @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      htrans <= 2'b00; haddr <= '0; hwrite <= 1'b0; hsize <= 3'd2; hprot <= 4'b0011;
      hwdata <= '0; ap_valid <= 1'b0; dp_valid <= 1'b0; issued <= 0; completed <= 0;
      done <= 1'b0; checks <= 0; failures <= 0; n_okay <= 0; n_err_invalid <= 0;
      n_err_slave <= 0; n_wait_cycles <= 0; err_first <= 1'b0;
      foreach (ref_mem[i, j]) ref_mem[i][j] <= 32'h0;
    end else if (!hready) begin
      n_wait_cycles <= n_wait_cycles + 1;
      if (hresp) err_first <= 1'b1;
    end else begin
      // the data phase in progress ends here
      if (dp_valid) begin
        logic exp_err;
        exp_err = invalid(dp) || dp.addr[11:8] == 4'hF;
        checks <= checks + 1;
        if (hresp !== exp_err || (exp_err && !err_first)) begin
          failures <= failures + 1;
          $display("AHB FAIL addr=%h w=%b size=%0d hresp=%b exp %b (first cycle seen %b)",
                   dp.addr, dp.write, dp.size, hresp, exp_err, err_first);
        end else if (!exp_err && !dp.write &&
                     hrdata !== ref_mem[dp.addr[15:12]][dp.addr[5:2]]) begin
          failures <= failures + 1;
          $display("AHB FAIL read %h got %h exp %h", dp.addr, hrdata,
                   ref_mem[dp.addr[15:12]][dp.addr[5:2]]);
        end
        if (!exp_err && dp.write)
          for (int b = 0; b < 4; b++)
            if (lanes(dp)[b]) ref_mem[dp.addr[15:12]][dp.addr[5:2]][8*b +: 8] <= dp.wdata[8*b +: 8];
        if (invalid(dp))   n_err_invalid <= n_err_invalid + 1;
        else if (exp_err)  n_err_slave   <= n_err_slave + 1;
        else               n_okay        <= n_okay + 1;
        completed <= completed + 1;
        if (completed + 1 == int'(N)) done <= 1'b1;
      end
      err_first <= 1'b0;
      // the address phase on the bus becomes the data phase
      dp       <= ap;
      dp_valid <= ap_valid;
      hwdata   <= (ap_valid && ap.write) ? ap.wdata : 32'h0;
      // drive the next address phase
      if (issued < int'(N) && ($urandom % 4) != 0) begin
        xfer_t x;
        x = rand_xfer();
        ap       <= x;
        ap_valid <= 1'b1;
        htrans   <= 2'b10;
        haddr    <= x.addr;
        hwrite   <= x.write;
        hsize    <= x.size;
        issued   <= issued + 1;
      end else begin
        ap_valid <= 1'b0;
        htrans   <= 2'b00;
      end
    end
  end

endmodule
