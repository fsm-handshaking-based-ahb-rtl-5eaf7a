// tb_apb_master_fsm: runs the APB master state machine against the
// peripheral model, feeding requests straight into its mailbox ports.
// Part 1: 600 random reads and writes (including decode misses and
// PSLVERR addresses), random wait states, random request gaps and a
// response side that is often not free, so every state edge is used.
// Each response is checked against a reference memory. Part 2: timing with
// no wait states: a transfer takes 2 PCLK cycles from the take to the
// response, back-to-back transfers follow every 2 cycles, and W wait states
// add W cycles.
module tb_apb_master_fsm;
  import apb_bridge_pkg::*;

  logic pclk = 1'b0, presetn = 1'b0;
  logic req_valid, req_take, rsp_free, rsp_put;
  apb_req_t req;
  apb_rsp_t rsp;
  logic [31:0] paddr, pwdata, prdata;
  logic [2:0]  pprot;
  logic [15:0] psel;
  logic        penable, pwrite, pready, pslverr;
  logic [3:0]  pstrb;
  apb_state_e  state, prev_state;
  int unsigned max_wait, wait_states, transfers, protocol_errors;

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [16][16];
  apb_req_t    reqs [$];
  apb_req_t    inflight [$];
  int n_hresp = 0, n_b2b = 0, n_decerr = 0, n_slverr = 0, n_rsp = 0;
  int free_pct = 50, gap_pct = 30;

  apb_master_fsm dut (
    .pclk, .presetn, .req_valid, .req, .req_take, .rsp_free, .rsp_put, .rsp,
    .paddr, .pprot, .psel, .penable, .pwrite, .pwdata, .pstrb,
    .pready, .prdata, .pslverr, .state
  );

  apb_slave_model u_slv (
    .pclk, .presetn, .paddr, .psel, .penable, .pwrite, .pwdata, .pstrb,
    .pready, .prdata, .pslverr, .max_wait, .wait_states, .transfers, .protocol_errors
  );

  always #5 pclk = ~pclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog: %0d responses", n_rsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic apb_req_t rand_req();
    apb_req_t r;
    int kind = $urandom % 10;
    r.write = $urandom % 2;
    r.wdata = $urandom;
    r.strb  = r.write ? 4'($urandom) : 4'h0;
    r.prot  = 3'($urandom);
    r.addr  = 32'h4000_0000 | (32'($urandom % 16) << 12) | (32'($urandom % 16) << 2);
    if (kind == 0) r.addr = 32'h5000_0000 | 32'($urandom % 65536);  // no peripheral
    if (kind == 1) r.addr[11:8] = 4'hF;                              // PSLVERR
    return r;
  endfunction

  function automatic apb_rsp_t expect_rsp(apb_req_t r);
    apb_rsp_t e;
    e.write = r.write;
    e.rdata = '0;
    if (r.addr[31:16] != 16'h4000) e.resp = RESP_DECERR;
    else if (r.addr[11:8] == 4'hF) e.resp = RESP_SLVERR;
    else begin
      e.resp = RESP_OKAY;
      if (r.write) begin
        for (int b = 0; b < 4; b++)
          if (r.strb[b]) ref_mem[r.addr[15:12]][r.addr[5:2]][8*b +: 8] = r.wdata[8*b +: 8];
      end else e.rdata = ref_mem[r.addr[15:12]][r.addr[5:2]];
    end
    return e;
  endfunction

  // drive at the falling edge
  always @(negedge pclk) begin
    req_valid <= 1'b0;
    if (reqs.size() > 0 && ($urandom % 100) >= gap_pct) begin
      req_valid <= 1'b1;
      req       <= reqs[0];
    end
    rsp_free <= ($urandom % 100) < free_pct;
  end

  // observe at the rising edge
  always @(posedge pclk) if (presetn) begin
    if (state == ST_HRESP && prev_state != ST_HRESP) n_hresp++;
    if (state == ST_SETUP && prev_state == ST_ENABLE) n_b2b++;
    prev_state <= state;
    if (penable) begin
      // the APB bus shows the request being served
      checks++;
      if (paddr !== inflight[0].addr || pwrite !== inflight[0].write ||
          (pwrite && (pwdata !== inflight[0].wdata || pstrb !== inflight[0].strb)) ||
          pprot !== inflight[0].prot) begin
        failures++; $display("FAIL APB bus does not match request");
      end
    end
    if (req_take) begin
      inflight.push_back(reqs.pop_front());
    end
    if (rsp_put) begin
      apb_rsp_t e;
      e = expect_rsp(inflight.pop_front());
      checks++;
      n_rsp++;
      if (rsp !== e) begin
        failures++;
        $display("FAIL rsp %0d got w=%b resp=%0d data=%h exp w=%b resp=%0d data=%h",
                 n_rsp, rsp.write, rsp.resp, rsp.rdata, e.write, e.resp, e.rdata);
      end
      if (e.resp == RESP_DECERR) n_decerr++;
      if (e.resp == RESP_SLVERR) n_slverr++;
    end
  end

  task automatic timed(int waits, int n, int expect_gap);
    int t_last = -1, t = 0, gaps_bad = 0;
    max_wait = waits;
    free_pct = 100; gap_pct = 0;
    for (int i = 0; i < n; i++) begin
      apb_req_t r = rand_req();
      r.addr = 32'h4000_0000 | (32'(i % 16) << 12);
      reqs.push_back(r);
    end
    @(posedge pclk);
    while (reqs.size() > 0 || inflight.size() > 0) begin
      @(posedge pclk);
      t++;
      if (rsp_put) begin
        if (t_last >= 0 && t - t_last != expect_gap) gaps_bad++;
        t_last = t;
      end
    end
    checks++;
    if (gaps_bad != 0) begin
      failures++; $display("FAIL %0d transfers not %0d cycles apart", gaps_bad, expect_gap);
    end
  endtask

  initial begin
    foreach (ref_mem[i, j]) ref_mem[i][j] = 32'h0;
    max_wait = 3;
    req_valid = 1'b0; rsp_free = 1'b0; req = '0;
    repeat (3) @(posedge pclk);
    checks++;
    if (psel !== '0 || penable !== 1'b0 || state !== ST_IDLE) begin
      failures++; $display("FAIL reset outputs");
    end
    @(negedge pclk) presetn = 1'b1;

    // Part 1: random traffic
    for (int i = 0; i < 600; i++) reqs.push_back(rand_req());
    wait (n_rsp == 600);
    repeat (4) @(posedge pclk);

    // Part 2: cycle counts
    begin : single
      int t = 0;
      max_wait = 0; free_pct = 100; gap_pct = 0;
      reqs.push_back(rand_req());
      reqs[0].addr = 32'h4000_3008;
      @(posedge pclk);
      while (!req_take) @(posedge pclk);
      while (!rsp_put) begin @(posedge pclk); t++; end
      checks++;
      if (t != 2) begin failures++; $display("FAIL single transfer took %0d cycles", t); end
    end
    repeat (3) @(posedge pclk);
    timed(0, 20, 2);
    repeat (3) @(posedge pclk);
    max_wait = 2;
    begin : waited
      int t = 0, w0;
      free_pct = 100; gap_pct = 0;
      w0 = wait_states;
      reqs.push_back(rand_req());
      reqs[0].addr = 32'h4000_1004;
      @(posedge pclk);
      while (!req_take) @(posedge pclk);
      while (!rsp_put) begin @(posedge pclk); t++; end
      checks++;
      if (t != 2 + int'(wait_states - w0)) begin
        failures++; $display("FAIL waited transfer took %0d cycles, %0d waits", t, wait_states - w0);
      end
    end

    // every mechanism must have happened
    checks++;
    if (n_hresp == 0 || n_b2b == 0 || n_decerr == 0 || n_slverr == 0 || wait_states == 0) begin
      failures++;
      $display("FAIL coverage hresp=%0d b2b=%0d decerr=%0d slverr=%0d waits=%0d",
               n_hresp, n_b2b, n_decerr, n_slverr, wait_states);
    end
    checks++;
    if (protocol_errors != 0) begin failures++; $display("FAIL %0d APB protocol errors", protocol_errors); end
    $display("hresp=%0d back-to-back=%0d decerr=%0d slverr=%0d wait_states=%0d",
             n_hresp, n_b2b, n_decerr, n_slverr, wait_states);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
