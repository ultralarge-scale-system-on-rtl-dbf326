// tb_soc_ijtag: configures the router over JTAG. Opens the DSR SIB, shifts
// an address word into the DSR TDR, checks that the router changes only at
// Update-DR (the old configuration stays in force while the next one is
// shifted), reads the word back, checks routing on both sides, and writes a
// core TDR through its own SIB.
module tb_soc_ijtag;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0;
  logic tdo;
  logic [2:0] ic = '0;
  logic [3:0] oc;
  logic [6:0] edt_in;
  logic [7:0] core_out = '0;
  logic [7:0] c1_tdr, c2_tdr;
  dsr_addr_t  addr;
  int checks = 0, failures = 0, n_cfg = 0, n_tck = 0;

  soc_ijtag dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input logic m, input logic d = 0);
    tms = m; tdi = d;
    #5 tck = 1;
    #5 tck = 0;
    #1;
    n_tck++;
  endtask

  task automatic load_ir(input logic [3:0] code);
    step(0); step(1); step(1); step(0); step(0);
    for (int b = 0; b < 4; b++) step(b == 3, code[b]);
    step(1); step(0);
  endtask

  // DR scan of n bits (bit 0 first); returns the bits seen on tdo. The
  // router configuration must stay at 'hold' until Update-DR.
  task automatic dr_scan(input int n, input logic [31:0] bits, output logic [31:0] seen,
                         input logic [13:0] hold);
    seen = '0;
    step(1); step(0); step(0);         // SelDR CapDR ShDR
    for (int b = 0; b < n; b++) begin
      seen[b] = tdo;
      step(b == n - 1, bits[b]);
      chk(addr == dsr_addr_t'(hold), "router unchanged until Update-DR");
    end
    step(1); step(0);                  // UpdDR RTI
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] seen;
    logic [13:0] a, a_old;
    #2 trst_n = 0;
    #10 trst_n = 1;
    step(1);                           // network reset is synchronous to tck
    chk(addr == '0, "DSR address 0 after reset");
    load_ir(4'b1000);
    // path: SIB(C1) SIB(C2) SIB(DSR); first bit shifted ends in SIB(DSR)
    dr_scan(3, 32'b001, seen, 14'h0);
    a_old = '0;
    for (int n = 0; n < 8; n++) begin
      a = 14'($urandom);
      // path: SIB(C1) SIB(C2) TDR(DSR, 14) SIB(DSR): keep SIB(DSR) open
      dr_scan(17, {15'b0, 2'b00, a, 1'b1}, seen, a_old);
      chk(addr == dsr_addr_t'(a), "new configuration after Update-DR");
      n_cfg++;
      if (n > 0) chk(seen[0] == 1'b1 && seen[14:1] == a_old, "captured address read back");
      for (int r = 0; r < 20; r++) begin
        ic = 3'($urandom); core_out = 8'($urandom);
        #1;
        chk(edt_in == ref_edt(ic, a[5:0]), "input routing");
        chk(oc == ref_oc(core_out, a[13:6]), "output routing");
      end
      a_old = a;
    end
    // open SIB(C1) as well (it is nearest tdi, so its bit is shifted last) and write its TDR; DSR word re-sent unchanged
    dr_scan(17, {15'b0, 2'b10, a, 1'b1}, seen, a);
    dr_scan(25, {7'b0, 8'h5c, 1'b1, 1'b0, a, 1'b1}, seen, a);
    chk(c1_tdr == 8'h5c, "core C1 TDR written through its SIB");
    chk(addr == dsr_addr_t'(a), "DSR word kept");
    $display("configurations: %0d, tck cycles: %0d", n_cfg, n_tck);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
