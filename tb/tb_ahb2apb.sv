// tb_ahb2apb: end-to-end test of the AHB to APB bridge.
//
// HCLK has a 10 ns period; PCLK has a random period between 6 and 34 ns
// that changes every half cycle. The self-checking AHB master issues 500
// pipelined single transfers (bytes, halfwords and words; some outside the
// APB region, some with an unsupported size, some to the PSLVERR area); the
// APB side is the 16 peripheral model with 0 to 3 random wait states.
// Checks: every AHB response and read value (in the master model), the APB
// rules (in the peripheral model), that invalid commands never reach APB,
// and that each mechanism happened: ERROR for an invalid command, ERROR
// from PSLVERR, PREADY wait states and HREADYOUT wait states.
module tb_ahb2apb;
  import apb_bridge_pkg::*;

  logic hclk = 1'b0, pclk = 1'b0, hresetn = 1'b0, presetn = 1'b0;
  logic [31:0] haddr, hwdata, hrdata, paddr, pwdata, prdata;
  logic [1:0]  htrans;
  logic [2:0]  hsize, pprot;
  logic [3:0]  hprot, pstrb;
  logic        hwrite, hreadyout, hresp, done;
  logic [15:0] psel;
  logic        penable, pwrite, pready, pslverr;
  apb_state_e  apb_state;
  int unsigned wait_states, transfers, protocol_errors;
  int m_checks, m_failures, n_okay, n_err_invalid, n_err_slave, n_wait;
  int checks = 0, failures = 0;

  ahb2apb dut (.*, .hsel(1'b1), .hready(hreadyout));

  ahb_master_model #(.N(500)) u_master (
    .hclk, .hresetn, .haddr, .htrans, .hwrite, .hsize, .hprot, .hwdata,
    .hready(hreadyout), .hresp, .hrdata, .done,
    .checks(m_checks), .failures(m_failures), .n_okay, .n_err_invalid, .n_err_slave,
    .n_wait_cycles(n_wait)
  );

  apb_slave_model u_slv (
    .pclk, .presetn, .paddr, .psel, .penable, .pwrite, .pwdata, .pstrb,
    .pready, .prdata, .pslverr, .max_wait(3), .wait_states, .transfers, .protocol_errors
  );

  always #5 hclk = ~hclk;
  always begin
    #($urandom_range(17, 3));
    pclk = ~pclk;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

  initial begin
    #100;
    checks++;
    if (psel !== '0 || penable || !hreadyout || hresp) begin failures++; $display("FAIL reset outputs"); end
    hresetn = 1'b1; presetn = 1'b1;
    wait (done);
    #200;
    checks++;
    if (n_err_invalid == 0 || n_err_slave == 0 || wait_states == 0 || n_wait == 0) begin
      failures++; $display("FAIL coverage");
    end
    checks++;
    // only valid commands reach APB
    if (transfers != unsigned'(n_okay + n_err_slave)) begin
      failures++; $display("FAIL %0d APB transfers for %0d valid commands", transfers, n_okay + n_err_slave);
    end
    checks++;
    if (protocol_errors != 0) begin failures++; $display("FAIL %0d APB protocol errors", protocol_errors); end
    $display("okay=%0d err_invalid=%0d err_pslverr=%0d apb_wait_states=%0d hready_low_cycles=%0d",
             n_okay, n_err_invalid, n_err_slave, wait_states, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end
endmodule
