// tb_apb_addr_decoder: checks the peripheral select decode against an
// independent model for every window of the region, for addresses just
// outside it and for random addresses, with 16 and with 10 peripherals.
module tb_apb_addr_decoder;
  logic [31:0] addr;
  logic [15:0] sel16;
  logic [9:0]  sel10;
  logic        miss16, miss10;
  int checks = 0, failures = 0;

  apb_addr_decoder dut16 (.addr, .sel(sel16), .miss(miss16));
  apb_addr_decoder #(.NUM_SLAVES(10), .BASE_ADDR(32'h8000_0000), .SLOT_LSB(8))
    dut10 (.addr, .sel(sel10), .miss(miss10));

  function automatic logic [15:0] model(logic [31:0] a, logic [31:0] base,
                                        int lsb, int n);
    logic [15:0] s = '0;
    int idx = int'((a >> lsb) & 32'hF);
    if ((a >> (lsb + 4)) == (base >> (lsb + 4)) && idx < n) s[idx] = 1'b1;
    return s;
  endfunction

  task automatic check(logic [31:0] a);
    logic [15:0] e16, e10;
    addr = a;
    #1;
    e16 = model(a, 32'h4000_0000, 12, 16);
    e10 = model(a, 32'h8000_0000, 8, 10);
    checks++;
    if (sel16 !== e16 || miss16 !== (e16 == 0)) begin
      failures++; $display("FAIL16 addr=%h sel=%h miss=%b exp=%h", a, sel16, miss16, e16);
    end
    checks++;
    if (sel10 !== e10[9:0] || miss10 !== (e10 == 0)) begin
      failures++; $display("FAIL10 addr=%h sel=%h miss=%b exp=%h", a, sel10, miss10, e10[9:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      check(32'h4000_0000 + i * 32'h1000 + 32'($urandom % 4096));
      check(32'h8000_0000 + i * 32'h100 + 32'($urandom % 256));
    end
    check(32'h3FFF_FFFC);  // just below the region
    check(32'h4001_0000);  // just above the region
    check(32'h7FFF_FFFC);
    check(32'h8000_1000);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a = $urandom;
      if (i % 3 == 0) a = {16'h4000, a[15:0]};
      if (i % 3 == 1) a = {20'h80000, a[11:0]};
      check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
