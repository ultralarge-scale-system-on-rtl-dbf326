// soc_test_top: scan test bandwidth management for a multicore SoC.
//
// Three ATE input channels reach the EDT decompressor inputs of five cores,
// and the cores' compactor outputs reach four ATE output channels, through a
// dynamic scan router (DSR) whose address registers the test schedule
// rewrites between groups of patterns. This top holds the router three
// times, once with each way of delivering the router's control data:
//   ij_*  through the IEEE 1149.1 TAP and an IEEE 1687 (IJTAG) network
//   cc_*  through dedicated control chains selected by a control flag
//   pl_*  through control bits pipelined in the scan channels
// The cores themselves are outside this design: for each variant their EDT
// inputs leave as *_edt_in and their compactor outputs return as
// *_core_out (numbering in dsr_pkg). cc and pl share clk and rst (the scan
// clock, synchronous active-high reset); the IJTAG variant runs on tck.
module soc_test_top
  import dsr_pkg::*;
(
  // IJTAG variant
  input  logic                  tck,
  input  logic                  trst_n,
  input  logic                  tms,
  input  logic                  tdi,
  output logic                  tdo,
  input  logic [N_IC-1:0]       ij_ic,
  output logic [N_OC-1:0]       ij_oc,
  output logic [N_EDT_IN-1:0]   ij_edt_in,
  input  logic [N_CORE_OUT-1:0] ij_core_out,
  output logic [7:0]            ij_c1_tdr,
  output logic [7:0]            ij_c2_tdr,
  output dsr_addr_t             ij_addr,
  // scan clock domain
  input  logic                  clk,
  input  logic                  rst,
  // control-chain variant
  input  logic                  cc_se,
  input  logic [N_IC-1:0]       cc_ic,
  output logic [N_OC-1:0]       cc_oc,
  output logic [N_EDT_IN-1:0]   cc_edt_in,
  input  logic [N_CORE_OUT-1:0] cc_core_out,
  output dsr_addr_t             cc_addr,
  output logic                  cc_cfg_mode,
  // pipeline variant
  input  logic                  pl_se,
  input  logic [N_IC-1:0]       pl_ic,
  output logic [N_OC-1:0]       pl_oc,
  output logic [N_EDT_IN-1:0]   pl_edt_in,
  input  logic [N_CORE_OUT-1:0] pl_core_out,
  output dsr_addr_t             pl_addr
);
  soc_ijtag #(.CORE_TDR_W(8)) u_ijtag (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .ic(ij_ic), .oc(ij_oc), .edt_in(ij_edt_in), .core_out(ij_core_out),
    .c1_tdr(ij_c1_tdr), .c2_tdr(ij_c2_tdr), .addr(ij_addr)
  );

  soc_ctrl_chain u_cc (
    .clk, .rst, .se(cc_se),
    .ic(cc_ic), .oc(cc_oc), .edt_in(cc_edt_in), .core_out(cc_core_out),
    .addr(cc_addr), .cfg_mode(cc_cfg_mode)
  );

  soc_pipeline u_pl (
    .clk, .rst, .se(pl_se),
    .ic(pl_ic), .oc(pl_oc), .edt_in(pl_edt_in), .core_out(pl_core_out),
    .addr(pl_addr)
  );
endmodule
