// soc_pipeline: DSR configured by control bits pipelined in the scan channels.
//
// Every ATE input channel i carries its own control bits in front of its
// test data: a pipe_ctrl_stage of dsr_pkg::chain_len(i) flops holds the
// address of demux i followed by the addresses of the output muxes that
// channel owns (dsr_pkg::oc_owner: OC1..OC3 with IC1..IC3, OC4 with IC3).
// When a scan load ends (se falls) all shadow registers update at once, so a
// configuration loaded with one pattern governs the next one; the very first
// vector of a test is therefore a setup vector only. Every pattern repeats
// the control bits, which is cheap because they are few next to the shift
// length, and any number of configurations is possible.
//
// Layout of channel i's stage, from the channel input: demux address
// (shadow[L-1 -: 2]), then each owned output mux in increasing order. The ATE
// shifts the control bits last, the bit destined for the far end first.
// Test data reach the DSR delayed by chain_len(i) shift cycles.
module soc_pipeline
  import dsr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   se,
  input  logic [N_IC-1:0]        ic,
  output logic [N_OC-1:0]        oc,
  output logic [N_EDT_IN-1:0]    edt_in,
  input  logic [N_CORE_OUT-1:0]  core_out,
  output dsr_addr_t              addr
);
  logic se_q, upd;
  always_ff @(posedge clk)
    if (rst) se_q <= 1'b0;
    else     se_q <= se;
  assign upd = se_q && !se;            // end of a pattern upload

  logic [N_IC-1:0] dsr_ic;

  for (genvar i = 0; i < N_IC; i++) begin : g_ch
    localparam int unsigned L = chain_len(i);
    logic [L-1:0] sh;

    pipe_ctrl_stage #(.LEN(L)) u_stage (
      .clk, .rst, .se, .upd, .din(ic[i]), .dout(dsr_ic[i]), .shadow(sh)
    );

    assign addr.is[i] = sh[L-1 -: SEL_W];
    for (genvar j = 0; j < N_OC; j++) begin : g_own
      if (oc_owner(j) == i) begin : g_os
        assign addr.os[j] = sh[L-1-SEL_W*(own_pos(j)+1) -: SEL_W];
      end
    end
  end

  // The router configuration may only change at the end of a load.
  a_addr_stable_in_shift: assert property (
    @(posedge clk) disable iff (rst) (se && $past(se)) |-> $stable(addr)
  ) else $error("DSR address changed during a scan load");

  dsr_network u_dsr (
    .addr, .ic(dsr_ic), .edt_in, .core_out, .oc
  );
endmodule
