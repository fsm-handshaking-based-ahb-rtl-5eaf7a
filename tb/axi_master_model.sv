// axi_master_model: self-checking AXI4-Lite master for testbenches.
//
// Issues N_RD reads and N_WR writes at random times, up to 4 of each
// outstanding, and often raises a read and a write in the same cycle. AW and
// W are always raised together. BREADY and RREADY are random. Addresses go to
// 16 peripheral windows at 32'h4000_0000 + i*4 KB, some to the PSLVERR area
// (bits [11:8] = 4'hF) and some outside the APB region.
// The model keeps its own copy of peripheral memory and applies each
// transfer to it in the order the slave accepts them; from that it knows
// every B and R response (OKAY, SLVERR or DECERR, and read data) and checks
// them in order. It also checks that a write is never accepted while a read
// is waiting, and counts how often a read and a write competed.
module axi_master_model #(
  parameter int unsigned N_RD = 100,
  parameter int unsigned N_WR = 100
) (
  input  logic        aclk,
  input  logic        aresetn,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] awaddr,
  output logic [2:0]  awprot,
  output logic        wvalid,
  input  logic        wready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  input  logic        bvalid,
  output logic        bready,
  input  logic [1:0]  bresp,
  output logic        arvalid,
  input  logic        arready,
  output logic [31:0] araddr,
  output logic [2:0]  arprot,
  input  logic        rvalid,
  output logic        rready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          n_conflicts,
  output int          n_okay,
  output int          n_slverr,
  output int          n_decerr
);

  typedef struct packed {
    logic [1:0]  resp;
    logic [31:0] data;
  } exp_t;

  logic [31:0] ref_mem [16][16];
  exp_t exp_b [$];
  exp_t exp_r [$];
  int   rd_issued, wr_issued, rd_done, wr_done;

  function automatic logic [31:0] rand_addr();
    logic [31:0] a;
    int k = $urandom % 10;
    a = 32'h4000_0000 | (32'($urandom % 16) << 12) | (32'($urandom % 8) << 2);
    if (k == 0) a[31:24] = 8'h50;    // no peripheral there
    if (k == 1) a[11:8]  = 4'hF;     // peripheral answers PSLVERR
    return a;
  endfunction

  function automatic logic [1:0] resp_of(logic [31:0] a);
    if (a[31:16] != 16'h4000) return 2'b11;
    if (a[11:8] == 4'hF)      return 2'b10;
    return 2'b00;
  endfunction

  always @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      awvalid <= 1'b0; wvalid <= 1'b0; arvalid <= 1'b0; bready <= 1'b0; rready <= 1'b0;
      awaddr <= '0; wdata <= '0; wstrb <= '0; awprot <= '0; araddr <= '0; arprot <= '0;
      rd_issued <= 0; wr_issued <= 0; rd_done <= 0; wr_done <= 0; done <= 1'b0;
      checks <= 0; failures <= 0; n_conflicts <= 0; n_okay <= 0; n_slverr <= 0; n_decerr <= 0;
      foreach (ref_mem[i, j]) ref_mem[i][j] = 32'h0;
    end else begin
      logic [31:0] a;
      logic [31:0] cur;
      // accepted requests, in acceptance order (at most one per cycle)
      if (arvalid && awvalid && wvalid && arready) n_conflicts <= n_conflicts + 1;
      if (awvalid && awready && arvalid) begin
        failures <= failures + 1;
        $display("AXI FAIL write accepted while a read was waiting");
      end
      if (arvalid && arready) begin
        exp_r.push_back({resp_of(araddr),
                         resp_of(araddr) == 2'b00 ? ref_mem[araddr[15:12]][araddr[4:2]] : 32'h0});
        arvalid <= 1'b0;
      end
      if (awvalid && awready) begin
        checks <= checks + 1;
        if (!(wvalid && wready)) begin
          failures <= failures + 1; $display("AXI FAIL AW accepted without W");
        end
        exp_b.push_back({resp_of(awaddr), 32'h0});
        if (resp_of(awaddr) == 2'b00) begin
          cur = ref_mem[awaddr[15:12]][awaddr[4:2]];
          for (int b = 0; b < 4; b++) if (wstrb[b]) cur[8*b +: 8] = wdata[8*b +: 8];
          ref_mem[awaddr[15:12]][awaddr[4:2]] = cur;
        end
        awvalid <= 1'b0;
        wvalid  <= 1'b0;
      end
      // responses
      if (bvalid && bready) begin
        checks <= checks + 1;
        if (exp_b.size() == 0 || bresp !== exp_b[0].resp) begin
          failures <= failures + 1; $display("AXI FAIL bresp %0d", bresp);
        end
        if (bresp == 2'b00) n_okay <= n_okay + 1;
        if (bresp == 2'b10) n_slverr <= n_slverr + 1;
        if (bresp == 2'b11) n_decerr <= n_decerr + 1;
        if (exp_b.size() != 0) void'(exp_b.pop_front());
        wr_done <= wr_done + 1;
      end
      if (rvalid && rready) begin
        checks <= checks + 1;
        if (exp_r.size() == 0 || rresp !== exp_r[0].resp || rdata !== exp_r[0].data) begin
          failures <= failures + 1;
          $display("AXI FAIL read resp %0d data %h exp %0d %h", rresp, rdata,
                   exp_r.size() ? exp_r[0].resp : 2'bxx, exp_r.size() ? exp_r[0].data : 32'hx);
        end
        if (rresp == 2'b00) n_okay <= n_okay + 1;
        if (rresp == 2'b10) n_slverr <= n_slverr + 1;
        if (rresp == 2'b11) n_decerr <= n_decerr + 1;
        if (exp_r.size() != 0) void'(exp_r.pop_front());
        rd_done <= rd_done + 1;
      end
      bready <= ($urandom % 3) != 0;
      rready <= ($urandom % 3) != 0;
      // new requests: a read and a write often start in the same cycle
      if ((!arvalid || arready) && rd_issued < int'(N_RD) && rd_issued - rd_done < 4 &&
          ($urandom % 3) == 0) begin
        a = rand_addr();
        arvalid <= 1'b1; araddr <= a; arprot <= 3'($urandom);
        rd_issued <= rd_issued + 1;
      end
      if ((!awvalid || awready) && wr_issued < int'(N_WR) && wr_issued - wr_done < 4 &&
          ($urandom % 3) == 0) begin
        a = rand_addr();
        awvalid <= 1'b1; wvalid <= 1'b1; awaddr <= a; awprot <= 3'($urandom);
        wdata <= $urandom; wstrb <= 4'($urandom);
        wr_issued <= wr_issued + 1;
      end
      if (rd_done == int'(N_RD) && wr_done == int'(N_WR)) done <= 1'b1;
    end
  end

endmodule
