// tb_soc_ctrl_chain: alternates data vectors and configuration vectors.
// A data vector ends its IC1 stream with the flag for the following vector.
// Checks: the mode switches only at the end of a load; in configuration mode
// the EDT inputs see nothing and the chains take the last bits sent; in data
// mode the chains hold, IC1 data arrive one shift late through CF and the
// router follows the loaded configuration on both sides.
module tb_soc_ctrl_chain;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  localparam int SHIFT = 16;
  localparam int LEN [3] = '{4, 4, 6};

  logic clk = 0, rst = 1, se = 0;
  logic [2:0] ic = '0;
  logic [3:0] oc;
  logic [6:0] edt_in;
  logic [7:0] core_out = '0;
  dsr_addr_t  addr;
  logic       cfg_mode;
  int checks = 0, failures = 0, n_cfg = 0, n_data = 0;

  soc_ctrl_chain dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [5:0] ctrl_word(int ch, logic [5:0] is, logic [7:0] os);
    case (ch)
      0: return {2'b00, is[1:0], os[1:0]};
      1: return {2'b00, is[3:2], os[3:2]};
      default: return {is[5:4], os[5:4], os[7:6]};
    endcase
  endfunction

  logic [5:0] cur_is; logic [7:0] cur_os;
  logic prev_ic1;   // bit held in CF

  // data vector; its last IC1 bit is the flag for the next vector
  task automatic data_vec(input logic next_cfg);
    chk(!cfg_mode, "data mode before data vector");
    se = 1;
    for (int t = 0; t < SHIFT; t++) begin
      logic [2:0] d;
      d = 3'($urandom);
      if (t == SHIFT - 1) d[0] = next_cfg;
      ic = d;
      core_out = 8'($urandom);
      #1;
      chk(edt_in == ref_edt({d[2], d[1], prev_ic1}, cur_is), "data routed, IC1 one shift late");
      chk(oc == ref_oc(core_out, cur_os), "output routing");
      @(posedge clk);
      prev_ic1 = d[0];
      #1;
      chk(addr == dsr_addr_t'({cur_os, cur_is}), "chains hold in data mode");
    end
    se = 0;
    @(posedge clk); #1;
    chk(cfg_mode == next_cfg, "mode follows flag at end of load");
    @(posedge clk); #1;
    n_data++;
  endtask

  // configuration vector, leaving data mode afterwards
  task automatic cfg_vec(input logic [5:0] nis, input logic [7:0] nos);
    logic [5:0] cw [3];
    for (int c = 0; c < 3; c++) cw[c] = ctrl_word(c, nis, nos);
    chk(cfg_mode, "configuration mode before configuration vector");
    se = 1;
    for (int t = 0; t < SHIFT; t++) begin
      logic [2:0] d;
      for (int c = 1; c < 3; c++) begin
        int pos;
        pos = t - (SHIFT - LEN[c]);
        d[c] = (pos >= 0) ? cw[c][pos] : 1'($urandom);
      end
      // IC1 runs one bit ahead (CF) and ends with the flag 0
      begin
        int pos0;
        pos0 = t - (SHIFT - 1 - LEN[0]);
        d[0] = (t == SHIFT - 1) ? 1'b0 : (pos0 >= 0) ? cw[0][pos0] : 1'($urandom);
      end
      ic = d;
      #1;
      chk(edt_in == '0, "EDT inputs idle during configuration");
      @(posedge clk);
      prev_ic1 = d[0];
      #1;
    end
    se = 0;
    cur_is = nis; cur_os = nos;
    chk(addr == dsr_addr_t'({cur_os, cur_is}), "chains loaded");
    @(posedge clk); #1;
    chk(!cfg_mode, "back to data mode");
    @(posedge clk); #1;
    n_cfg++;
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
    cur_is = '0; cur_os = '0; prev_ic1 = 0;
    chk(addr == '0 && !cfg_mode, "reset state");
    for (int p = 0; p < 20; p++) begin
      logic c;
      c = (p % 3) == 0;
      data_vec(c);
      if (c) cfg_vec(6'($urandom), 8'($urandom));
    end
    chk(n_cfg > 0 && n_data > 0, "both vector kinds applied");
    $display("configuration vectors: %0d, data vectors: %0d", n_cfg, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
