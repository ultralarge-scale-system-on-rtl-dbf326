// tb_soc_pipeline: pattern loads with the control bits appended to each
// channel stream. Checks that the router configuration changes only when a
// load ends, to the bits sent at the end of the previous load, that test
// data reach the EDT inputs delayed by the channel's pipeline length, and
// that the output channels follow the new configuration.
module tb_soc_pipeline;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  localparam int SHIFT = 24;              // shift cycles per pattern
  localparam int LEN [3] = '{4, 4, 6};    // control bits per channel

  logic clk = 0, rst = 1, se = 0;
  logic [2:0] ic = '0;
  logic [3:0] oc;
  logic [6:0] edt_in;
  logic [7:0] core_out = '0;
  dsr_addr_t  addr;
  int checks = 0, failures = 0, reconfigs = 0;

  soc_pipeline dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // control bits of each channel, element 0 shifted first
  function automatic logic [5:0] ctrl_word(int ch, logic [5:0] is, logic [7:0] os);
    case (ch)
      0: return {2'b00, is[1:0], os[1:0]};
      1: return {2'b00, is[3:2], os[3:2]};
      default: return {is[5:4], os[5:4], os[7:6]};
    endcase
  endfunction

  logic [5:0] cur_is;  logic [7:0] cur_os;
  logic hist [3][$];

  // one pattern load carrying the configuration for the next pattern
  task automatic load(input logic [5:0] nis, input logic [7:0] nos);
    logic [5:0] cw [3];
    for (int c = 0; c < 3; c++) cw[c] = ctrl_word(c, nis, nos);
    se = 1;
    for (int t = 0; t < SHIFT; t++) begin
      logic [2:0] d;
      for (int c = 0; c < 3; c++) begin
        int pos;
        pos = t - (SHIFT - LEN[c]);
        d[c] = (pos >= 0) ? cw[c][pos] : 1'($urandom);
      end
      ic = d;
      core_out = 8'($urandom);
      #1;
      begin
        logic [2:0] del;
        for (int c = 0; c < 3; c++) del[c] = hist[c][hist[c].size() - LEN[c]];
        chk(edt_in == ref_edt(del, cur_is), "EDT data through pipeline");
        chk(oc == ref_oc(core_out, cur_os), "output routing");
        chk(addr == dsr_addr_t'({cur_os, cur_is}), "config stable during shift");
      end
      @(posedge clk);
      for (int c = 0; c < 3; c++) hist[c].push_back(d[c]);
      #1;
    end
    se = 0;
    @(posedge clk); #1;                  // shadow update edge
    cur_is = nis; cur_os = nos;
    reconfigs++;
    chk(addr == dsr_addr_t'({cur_os, cur_is}), "shadow update at end of load");
    @(posedge clk); #1;                  // capture cycle
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cur_is = '0; cur_os = '0;
    for (int c = 0; c < 3; c++) for (int k = 0; k < 6; k++) hist[c].push_back(1'b0);
    for (int p = 0; p < 30; p++) load(6'($urandom), 8'($urandom));
    chk(reconfigs == 30, "every load reconfigured");
    $display("reconfigurations: %0d", reconfigs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
