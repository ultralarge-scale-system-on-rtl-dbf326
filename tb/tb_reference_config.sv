// tb_reference_config: applies one fixed router configuration through each of the
// three control-delivery variants of soc_test_top and checks that it lands in
// the address word and routes as the reference model says. The configuration
// is that of a reference simulation of this router: demux addresses
// IC1..IC3 = 01, 10, 01 and mux addresses OC1..OC4 = 00, 10, 01, 01.
// For the two scan-channel variants the inputs are held constant long enough
// to fill the channel pipelines before routing is checked.
module tb_reference_config;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [5:0]  IS   = {2'b01, 2'b10, 2'b01};            // is3 is2 is1
  localparam logic [7:0]  OS   = {2'b01, 2'b01, 2'b10, 2'b00};     // os4 os3 os2 os1
  localparam logic [13:0] WORD = {OS, IS};
  localparam int SHIFT = 16;
  localparam int LEN [3] = '{4, 4, 6};

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic clk = 0, rst = 1, cc_se = 0, pl_se = 0;
  logic [2:0] ij_ic = '0, cc_ic = '0, pl_ic = '0;
  logic [3:0] ij_oc, cc_oc, pl_oc;
  logic [6:0] ij_edt_in, cc_edt_in, pl_edt_in;
  logic [7:0] ij_core_out = '0, cc_core_out = '0, pl_core_out = '0;
  logic [7:0] ij_c1_tdr, ij_c2_tdr;
  dsr_addr_t  ij_addr, cc_addr, pl_addr;
  logic       cc_cfg_mode;
  int checks = 0, failures = 0;

  soc_test_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [5:0] ctrl_word(int ch);
    case (ch)
      0: return {2'b00, WORD[1:0], WORD[7:6]};
      1: return {2'b00, WORD[3:2], WORD[9:8]};
      default: return {WORD[5:4], WORD[11:10], WORD[13:12]};
    endcase
  endfunction

  task automatic step(input logic m, input logic d = 0);
    tms = m; tdi = d;
    #5 tck = 1;
    #5 tck = 0;
    #1;
  endtask

  task automatic dr_scan(input int n, input logic [31:0] bits);
    step(1); step(0); step(0);
    for (int b = 0; b < n; b++) step(b == n - 1, bits[b]);
    step(1); step(0);
  endtask

  // shifts a load whose streams end with the control words; flag_ic1 adds
  // the extra trailing IC1 bit used by the control-chain variant
  task automatic ctrl_load(bit pl, bit flag_ic1);
    logic [5:0] cw [3];
    for (int c = 0; c < 3; c++) cw[c] = ctrl_word(c);
    if (pl) pl_se = 1; else cc_se = 1;
    for (int k = 0; k < SHIFT; k++) begin
      logic [2:0] d;
      for (int c = 0; c < 3; c++) begin
        int pos;
        pos = k - (SHIFT - LEN[c]) + ((c == 0 && flag_ic1) ? 1 : 0);
        d[c] = (pos >= 0 && pos < LEN[c]) ? cw[c][pos] : 1'b0;
      end
      if (pl) pl_ic = d; else cc_ic = d;
      @(posedge clk); #1;
    end
    pl_se = 0; cc_se = 0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  // constant data through a scan-channel variant, then routing check
  task automatic const_route(bit pl);
    for (int n = 0; n < 8; n++) begin
      logic [2:0] d;
      logic [7:0] co;
      d = 3'(n); co = 8'($urandom);
      if (pl) begin pl_ic = d; pl_core_out = co; pl_se = 1; end
      else    begin cc_ic = d; cc_core_out = co; cc_se = 1; end
      repeat (8) @(posedge clk);
      #1;
      if (pl) begin
        chk(pl_edt_in == ref_edt(d, IS), "pipeline input routing");
        chk(pl_oc == ref_oc(co, OS), "pipeline output routing");
      end else begin
        chk(cc_edt_in == ref_edt(d, IS), "control-chain input routing");
        chk(cc_oc == ref_oc(co, OS), "control-chain output routing");
      end
    end
    // one final shift of 0 so that the end of the load leaves the control
    // chain in data mode
    pl_ic = '0; cc_ic = '0;
    @(posedge clk); #1;
    pl_se = 0; cc_se = 0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #2 trst_n = 0;
    #10 trst_n = 1;

    // IJTAG
    step(1);
    step(0); step(1); step(1); step(0); step(0);
    for (int b = 0; b < 4; b++) step(b == 3, b == 3);
    step(1); step(0);
    dr_scan(3, 32'b001);
    dr_scan(17, {15'b0, 2'b00, WORD, 1'b1});
    chk(ij_addr == dsr_addr_t'(WORD), "IJTAG address word");
    for (int n = 0; n < 64; n++) begin
      ij_ic = 3'($urandom); ij_core_out = 8'($urandom);
      #1;
      chk(ij_edt_in == ref_edt(ij_ic, IS), "IJTAG input routing");
      chk(ij_oc == ref_oc(ij_core_out, OS), "IJTAG output routing");
    end

    // pipeline: one setup load
    ctrl_load(1, 0);
    chk(pl_addr == dsr_addr_t'(WORD), "pipeline address word");
    const_route(1);

    // control chain: flagged data load, then the configuration vector
    cc_se = 1; cc_ic = 3'b001;
    @(posedge clk); #1;
    cc_se = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(cc_cfg_mode, "configuration mode flagged");
    ctrl_load(0, 1);
    chk(cc_addr == dsr_addr_t'(WORD), "control-chain address word");
    chk(!cc_cfg_mode, "control chain back in data mode");
    const_route(0);
    chk(cc_addr == dsr_addr_t'(WORD), "control-chain word kept in data mode");
    chk(!cc_cfg_mode, "control chain still in data mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
