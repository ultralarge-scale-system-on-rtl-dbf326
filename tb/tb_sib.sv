// tb_sib: checks that a closed SIB is one bit in the path, that shifting and
// updating a 1 opens its segment (select raised, segment spliced in front of
// the SIB), that capture reads the SIB state back and that reset closes it.
module tb_sib;
  logic tck = 0, rst = 1, sel = 1, capture = 0, shift = 0, update = 0, si = 0;
  logic so, seg_si, seg_sel, seg_so = 0;
  int checks = 0, failures = 0;

  sib dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk1(input logic c, input logic s, input logic u, input logic d, input logic sso = 0);
    capture = c; shift = s; update = u; si = d; seg_so = sso;
    #5 tck = 1;
    #5 tck = 0;
    capture = 0; shift = 0; update = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk1(0, 0, 0, 0);
    rst = 0;
    chk(!seg_sel && !so, "closed after reset");
    // closed: si goes straight into the SIB cell, segment output ignored
    clk1(0, 1, 0, 1, 0);
    chk(so == 1, "closed SIB shifts si");
    clk1(0, 1, 0, 0, 1);
    chk(so == 0, "closed SIB ignores segment");
    chk(seg_si == si, "segment input follows si");
    // open it
    clk1(0, 1, 0, 1);
    clk1(0, 0, 1, 0);
    chk(seg_sel, "segment opened by update");
    // open: SIB cell now takes the segment output
    clk1(0, 1, 0, 0, 1);
    chk(so == 1, "open SIB shifts segment output");
    clk1(0, 1, 0, 1, 0);
    chk(so == 0, "open SIB ignores si");
    // deselected: nothing moves
    sel = 0;
    clk1(0, 1, 0, 0, 1);
    chk(so == 0, "no shift when not selected");
    chk(!seg_sel, "segment select needs sel");
    sel = 1;
    // capture reads back the update bit
    clk1(1, 0, 0, 0);
    chk(so == 1, "capture shows open state");
    // close again
    clk1(0, 1, 0, 0, 0);
    clk1(0, 0, 1, 0);
    chk(!seg_sel, "segment closed by update of 0");
    clk1(1, 0, 0, 0);
    chk(so == 0, "capture shows closed state");
    // reset closes
    clk1(0, 1, 0, 1);
    clk1(0, 0, 1, 0);
    chk(seg_sel, "reopened");
    rst = 1;
    clk1(0, 0, 0, 0);
    chk(!seg_sel, "reset closes segment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
