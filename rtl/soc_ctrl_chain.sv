// soc_ctrl_chain: DSR configured through dedicated control chains.
//
// Each ATE input channel ends in a 1:2 switch. In data mode the channel
// feeds its input demultiplexer; in control mode it feeds a short control
// chain that holds the address of that demux followed by the addresses of
// the output muxes the channel owns (dsr_pkg::oc_owner), while the demux
// input is held at 0. The mode comes from a control flag: CF is a flip-flop
// in series with IC1 and CFS its shadow. When a scan load ends (se falls)
// CFS takes the bit then in CF, i.e. the last bit sent on IC1, and all
// switches follow CFS for the next load. So the ATE marks the vector that
// follows as a configuration vector by ending the current IC1 load with 1.
// A configuration vector loads every chain at once and should end its IC1
// stream with 0 to return to data mode. Unlike the pipeline scheme, test
// vectors carry no control bits; only configuration changes cost a vector.
//
// Timing: chains and CF shift once per clk while se is high, entering at the
// demux field (chain bits L-1..L-2) and moving toward the last owned mux.
// IC1 data reach the DSR one shift cycle late (through CF); the first bit
// of each IC1 load is the flag left from the previous one. Synchronous
// active-high rst selects data mode with all addresses 0.
module soc_ctrl_chain
  import dsr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   se,
  input  logic [N_IC-1:0]        ic,
  output logic [N_OC-1:0]        oc,
  output logic [N_EDT_IN-1:0]    edt_in,
  input  logic [N_CORE_OUT-1:0]  core_out,
  output dsr_addr_t              addr,
  output logic                   cfg_mode   // CFS: current load goes to the chains
);
  logic se_q, upd, cf, cfs;

  always_ff @(posedge clk) begin
    if (rst) begin
      se_q <= 1'b0;
      cf   <= 1'b0;
      cfs  <= 1'b0;
    end else begin
      se_q <= se;
      if (se)  cf  <= ic[0];
      if (upd) cfs <= cf;
    end
  end
  assign upd      = se_q && !se;
  assign cfg_mode = cfs;

  logic [N_IC-1:0] ch, dsr_ic;
  always_comb begin
    ch    = ic;
    ch[0] = cf;
  end

  for (genvar i = 0; i < N_IC; i++) begin : g_ch
    localparam int unsigned L = chain_len(i);
    logic [L-1:0] chain;

    // 1:2 channel switch
    assign dsr_ic[i] = cfs ? 1'b0 : ch[i];

    always_ff @(posedge clk)
      if (rst)             chain <= '0;
      else if (se && cfs)  chain <= {ch[i], chain[L-1:1]};

    assign addr.is[i] = chain[L-1 -: SEL_W];
    for (genvar j = 0; j < N_OC; j++) begin : g_own
      if (oc_owner(j) == i) begin : g_os
        assign addr.os[j] = chain[L-1-SEL_W*(own_pos(j)+1) -: SEL_W];
      end
    end
  end

  // In data mode the control chains, and so the router, must hold.
  a_addr_stable_in_data: assert property (
    @(posedge clk) disable iff (rst) (!cfs && $past(!cfs)) |-> $stable(addr)
  ) else $error("DSR address changed in data mode");

  // While configuring, the cores receive nothing.
  a_idle_in_cfg: assert property (
    @(posedge clk) disable iff (rst) cfs |-> (dsr_ic == '0)
  ) else $error("channel data leaked to the DSR during configuration");

  dsr_network u_dsr (
    .addr, .ic(dsr_ic), .edt_in, .core_out, .oc
  );
endmodule
