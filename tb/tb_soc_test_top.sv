// tb_soc_test_top: end-to-end test of the whole design at its default sizes.
//
// Behavioural cores (core_model) sit on the EDT and compactor ports of each
// of the three variants. Each variant is taken through configuration A, then
// B, then A again, using its own control-delivery mechanism (JTAG scans,
// configuration vectors flagged through CF, control bits pipelined at the
// end of each pattern). During every pattern the bit on each ATE output
// channel is checked against the ATE input bit that should reach it: the
// one sent (channel pipeline + core chain) shift cycles earlier, through the
// core the configuration selects, inverted where the second compactor
// stream is observed. Configuration B uses the second input of OR gates and
// the second multiplexer of fanned-out core outputs. Each mechanism is
// counted and one that never happened counts as a failure.
module tb_soc_test_top;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  localparam int SHIFT = 20;    // shift cycles per pattern
  localparam int CLEN  = 8;     // core chain length

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic clk = 0, rst = 1;
  logic ij_se = 0, cc_se = 0, pl_se = 0;
  logic [2:0] ij_ic = '0, cc_ic = '0, pl_ic = '0;
  logic [3:0] ij_oc, cc_oc, pl_oc;
  logic [6:0] ij_edt_in, cc_edt_in, pl_edt_in;
  logic [7:0] ij_core_out, cc_core_out, pl_core_out;
  logic [7:0] ij_c1_tdr, ij_c2_tdr;
  dsr_addr_t  ij_addr, cc_addr, pl_addr;
  logic       cc_cfg_mode;

  soc_test_top dut (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .ij_ic, .ij_oc, .ij_edt_in, .ij_core_out, .ij_c1_tdr, .ij_c2_tdr, .ij_addr,
    .clk, .rst,
    .cc_se, .cc_ic, .cc_oc, .cc_edt_in, .cc_core_out, .cc_addr, .cc_cfg_mode,
    .pl_se, .pl_ic, .pl_oc, .pl_edt_in, .pl_core_out, .pl_addr
  );

  always #5 clk = ~clk;

  // ---- behavioural cores for each variant ----
  logic [6:0] edt [3];
  logic [7:0] cout [3];
  logic [2:0] se_v;
  assign edt[0] = ij_edt_in;  assign ij_core_out = cout[0];
  assign edt[1] = cc_edt_in;  assign cc_core_out = cout[1];
  assign edt[2] = pl_edt_in;  assign pl_core_out = cout[2];
  assign se_v = {pl_se, cc_se, ij_se};

  for (genvar v = 0; v < 3; v++) begin : g_cores
    core_model #(.N_IN(2), .N_OUT(2), .LEN(CLEN)) u_c1 (.clk, .se(se_v[v]), .edt_in(edt[v][1:0]), .out(cout[v][1:0]));
    core_model #(.N_IN(1), .N_OUT(1), .LEN(CLEN)) u_c2 (.clk, .se(se_v[v]), .edt_in(edt[v][2]),   .out(cout[v][2]));
    core_model #(.N_IN(2), .N_OUT(2), .LEN(CLEN)) u_c3 (.clk, .se(se_v[v]), .edt_in(edt[v][4:3]), .out(cout[v][4:3]));
    core_model #(.N_IN(1), .N_OUT(1), .LEN(CLEN)) u_c4 (.clk, .se(se_v[v]), .edt_in(edt[v][5]),   .out(cout[v][5]));
    core_model #(.N_IN(1), .N_OUT(2), .LEN(CLEN)) u_c5 (.clk, .se(se_v[v]), .edt_in(edt[v][6]),   .out(cout[v][7:6]));
  end

  // ---- configurations ----
  // A: IC1->C1.in0 IC2->C3.in1 IC3->C5; OC1<-C1.o0 OC2<-C3.o0 OC3<-C5.o1 OC4<-C1.o1
  // B: IC1->C4 IC2->C1.in0 (OR) IC3->C3.in0 (OR); OC1<-C3.o0 OC2<-C1.o0 (fan-out)
  //    OC3<-C4.o0 OC4<-C3.o1
  localparam logic [13:0] CFG [2] = '{
    {2'd0, 2'd3, 2'd2, 2'd0, 2'd3, 2'd2, 2'd0},
    {2'd1, 2'd2, 2'd0, 2'd2, 2'd1, 2'd0, 2'd3}
  };
  localparam int SRC [2][4] = '{'{0, 1, 2, 0}, '{2, 1, 0, 2}};   // feeding IC
  localparam bit INV [2][4] = '{'{0, 0, 1, 1}, '{0, 0, 0, 1}};   // second stream
  localparam int PIPE [3][3] = '{'{0, 0, 0}, '{1, 0, 0}, '{4, 4, 6}};
  localparam int LEN [3] = '{4, 4, 6};

  int checks = 0, failures = 0;
  int e2e [3] = '{0, 0, 0};
  int n_ij_cfg = 0, n_sib_open = 0, n_cc_cfgvec = 0, n_cc_switch = 0, n_pl_cfg = 0;
  int n_or_second = 0, n_fanout_second = 0, n_parallel = 0;
  int cur [3] = '{0, 0, 0};          // active configuration per variant (-1: none)
  int t [3] = '{0, 0, 0};            // shift cycles so far
  int t_act [3] = '{0, 0, 0};        // shift index where routing became valid
  logic hist [3][3][$];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [5:0] ctrl_word(int ch, logic [13:0] c);
    case (ch)
      0: return {2'b00, c[1:0], c[7:6]};
      1: return {2'b00, c[3:2], c[9:8]};
      default: return {c[5:4], c[11:10], c[13:12]};
    endcase
  endfunction

  function automatic logic [3:0] oc_of(int v);
    case (v)
      0: return ij_oc;
      1: return cc_oc;
      default: return pl_oc;
    endcase
  endfunction

  // one shift cycle of variant v with ATE input bits d
  task automatic shift_cycle(int v, logic [2:0] d, bit check);
    case (v)
      0: ij_ic = d;
      1: cc_ic = d;
      default: pl_ic = d;
    endcase
    #1;
    if (check && cur[v] >= 0) begin
      logic [3:0] oc;
      oc = oc_of(v);
      for (int j = 0; j < 4; j++) begin
        int src, s;
        src = SRC[cur[v]][j];
        s = t[v] - PIPE[v][src] - CLEN;
        if (s >= 0 && s + PIPE[v][src] >= t_act[v]) begin
          chk(oc[j] == (hist[v][src][s] ^ INV[cur[v]][j]),
              $sformatf("variant %0d cfg %0d OC%0d end to end", v, cur[v], j + 1));
          e2e[v]++;
          if (cur[v] == 1 && (j == 0 || j == 1)) n_or_second++;
          if (cur[v] == 1 && j == 1) n_fanout_second++;
          if (j == 0) n_parallel++;
        end
      end
    end
    @(posedge clk);
    for (int i = 0; i < 3; i++) hist[v][i].push_back(d[i]);
    t[v]++;
    #1;
  endtask

  // ---- JTAG helpers ----
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

  task automatic ij_configure(int c);
    dr_scan(17, {15'b0, 2'b00, CFG[c], 1'b1});
    chk(ij_addr == dsr_addr_t'(CFG[c]), "IJTAG configuration applied");
    cur[0] = c; t_act[0] = t[0];
    n_ij_cfg++;
  endtask

  task automatic ij_pattern();
    ij_se = 1;
    for (int k = 0; k < SHIFT; k++) shift_cycle(0, 3'($urandom), 1);
    ij_se = 0;
    @(posedge clk); #1;
  endtask

  // ---- pipeline variant: every pattern carries the next configuration ----
  task automatic pl_pattern(int next);
    logic [5:0] cw [3];
    for (int c = 0; c < 3; c++) cw[c] = ctrl_word(c, CFG[next]);
    pl_se = 1;
    for (int k = 0; k < SHIFT; k++) begin
      logic [2:0] d;
      for (int c = 0; c < 3; c++) begin
        int pos;
        pos = k - (SHIFT - LEN[c]);
        d[c] = (pos >= 0) ? cw[c][pos] : 1'($urandom);
      end
      shift_cycle(2, d, 1);
    end
    pl_se = 0;
    @(posedge clk); #1;
    chk(pl_addr == dsr_addr_t'(CFG[next]), "pipeline shadow update");
    if (next != cur[2]) begin
      n_pl_cfg++;
      cur[2] = next; t_act[2] = t[2];
    end
    @(posedge clk); #1;
  endtask

  // ---- control-chain variant ----
  task automatic cc_data(bit flag);
    cc_se = 1;
    for (int k = 0; k < SHIFT; k++) begin
      logic [2:0] d;
      d = 3'($urandom);
      if (k == SHIFT - 1) d[0] = flag;
      shift_cycle(1, d, 1);
    end
    cc_se = 0;
    @(posedge clk); #1;
    chk(cc_cfg_mode == flag, "control flag taken at end of load");
    if (flag) n_cc_switch++;
    @(posedge clk); #1;
  endtask

  task automatic cc_config(int c);
    logic [5:0] cw [3];
    for (int i = 0; i < 3; i++) cw[i] = ctrl_word(i, CFG[c]);
    t_act[1] = 1 << 30;                       // nothing reaches the cores now
    cc_se = 1;
    for (int k = 0; k < SHIFT; k++) begin
      logic [2:0] d;
      for (int i = 1; i < 3; i++) begin
        int pos;
        pos = k - (SHIFT - LEN[i]);
        d[i] = (pos >= 0) ? cw[i][pos] : 1'($urandom);
      end
      begin
        int pos0;
        pos0 = k - (SHIFT - 1 - LEN[0]);
        d[0] = (k == SHIFT - 1) ? 1'b0 : (pos0 >= 0) ? cw[0][pos0] : 1'($urandom);
      end
      shift_cycle(1, d, 0);
      chk(cc_edt_in == '0 || cc_cfg_mode == 0, "EDT inputs idle while configuring");
    end
    cc_se = 0;
    chk(cc_addr == dsr_addr_t'(CFG[c]), "control chains loaded");
    @(posedge clk); #1;
    chk(!cc_cfg_mode, "back to data mode");
    cur[1] = c; t_act[1] = t[1];
    n_cc_cfgvec++;
    @(posedge clk); #1;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = '{-1, -1, -1};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #2 trst_n = 0;
    #10 trst_n = 1;

    // IJTAG variant: select IJTAG, open the DSR SIB, then A, B, A
    step(1);
    step(0); step(1); step(1); step(0); step(0);
    for (int b = 0; b < 4; b++) step(b == 3, b == 3);
    step(1); step(0);
    dr_scan(3, 32'b001);
    n_sib_open++;
    foreach (CFG[c]) begin
      ij_configure(c);
      repeat (4) ij_pattern();
    end
    ij_configure(0);
    repeat (2) ij_pattern();

    // control-chain variant
    cc_data(1);
    cc_config(0);
    repeat (3) cc_data(0);
    cc_data(1);
    cc_config(1);
    repeat (3) cc_data(0);
    cc_data(1);
    cc_config(0);
    repeat (2) cc_data(0);

    // pipeline variant: the first load is a setup vector only
    pl_pattern(0);
    repeat (3) pl_pattern(0);
    pl_pattern(1);
    repeat (3) pl_pattern(1);
    pl_pattern(0);
    repeat (2) pl_pattern(0);

    $display("end-to-end bits: ijtag %0d, control chain %0d, pipeline %0d", e2e[0], e2e[1], e2e[2]);
    $display("ijtag reconfigurations %0d, SIB openings %0d", n_ij_cfg, n_sib_open);
    $display("configuration vectors %0d, mode switches %0d", n_cc_cfgvec, n_cc_switch);
    $display("pipeline reconfigurations %0d", n_pl_cfg);
    $display("OR-gate second inputs %0d, second fan-out muxes %0d, parallel-core cycles %0d",
             n_or_second, n_fanout_second, n_parallel);
    chk(e2e[0] > 0, "ijtag end-to-end data seen");
    chk(e2e[1] > 0, "control-chain end-to-end data seen");
    chk(e2e[2] > 0, "pipeline end-to-end data seen");
    chk(n_ij_cfg >= 3 && n_sib_open > 0, "IJTAG reconfiguration happened");
    chk(n_cc_cfgvec >= 3 && n_cc_switch >= 3, "configuration vectors happened");
    chk(n_pl_cfg >= 3, "pipeline reconfiguration happened");
    chk(n_or_second > 0, "OR gate second input used");
    chk(n_fanout_second > 0, "second fan-out multiplexer used");
    chk(n_parallel > 0, "three cores tested in parallel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
