// tb_tap_controller: walks the TAP through IR and DR scans.
// Checks the captured IR value on tdo, instruction decode (IJTAG / BYPASS),
// the capture/shift/update strobes to the network, the network path and the
// one-bit BYPASS path on tdo, and reset by five TMS ones.
module tb_tap_controller;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0;
  logic tdo, net_reset, net_sel, net_capture, net_shift, net_update, net_so = 0;
  int checks = 0, failures = 0;

  tap_controller dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one TCK period: drive, rising edge, falling edge
  task automatic step(input logic m, input logic d = 0);
    tms = m; tdi = d;
    #5 tck = 1;
    #5 tck = 0;
    #1;
  endtask

  task automatic load_ir(input logic [3:0] code);
    step(0); step(1); step(1); step(0); step(0);   // RTI SelDR SelIR CapIR ShIR
    for (int b = 0; b < 4; b++) begin
      chk(tdo == (b == 0), $sformatf("captured IR bit %0d on tdo", b));
      step(b == 3, code[b]);
    end
    step(1); step(0);                              // Update-IR, RTI
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 trst_n = 0;
    #10 trst_n = 1;
    #1 chk(net_reset, "TLR after trst");
    chk(!net_sel, "BYPASS after reset");

    load_ir(4'b1000);
    chk(net_sel, "IJTAG selected");

    // DR scan through the network
    step(1);                      // SelDR
    step(0);                      // -> CapDR
    chk(net_capture && !net_shift, "capture strobe");
    step(0);                      // -> ShDR
    chk(net_shift && !net_capture, "shift strobe");
    for (int b = 0; b < 6; b++) begin
      net_so = b[0] ^ b[1];
      step(b == 5, 0);
      chk(tdo == net_so, "network bit on tdo");
    end
    // now in Exit1-DR
    chk(!net_shift, "no shift in Exit1");
    step(1);                      // -> UpdDR
    chk(net_update, "update strobe");
    step(0);                      // RTI
    chk(!net_update && !net_capture && !net_shift, "strobes idle in RTI");

    // BYPASS: tdo is tdi delayed by one bit
    load_ir(4'b1111);
    chk(!net_sel, "BYPASS selected");
    step(1); step(0); step(0);    // SelDR CapDR ShDR
    chk(!net_shift, "no network shift under BYPASS");
    begin
      logic prev = 0;
      for (int b = 0; b < 8; b++) begin
        logic d;
        d = 1'($urandom);
        step(0, d);
        chk(tdo == d, "bypass register on tdo");
        prev = d;
      end
    end
    step(1); step(1); step(0);

    // five TMS ones reach Test-Logic-Reset from anywhere
    load_ir(4'b1000);
    step(1); step(0); step(0);    // in ShDR
    repeat (5) step(1);
    chk(net_reset && !net_sel, "TMS reset restores BYPASS");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
