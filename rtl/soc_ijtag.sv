// soc_ijtag: DSR configured through the IJTAG network.
//
// A TAP drives an IEEE 1687 network of three SIBs in the order
// tdi -> SIB(C1) -> SIB(C2) -> SIB(DSR) -> tdo. Each SIB hosts a TDR: those
// of C1 and C2 are core instrument registers brought out as ports, the DSR
// TDR holds all 14 DSR address bits (dsr_pkg::dsr_addr_t, input demux
// addresses in the low bits). Its parallel update register drives the
// router, so a new configuration can be shifted in while test patterns are
// applied on the scan channels and takes effect only at Update-DR.
//
// Timing: the IJTAG network runs on tck, which is typically 10 to 20 times
// slower than the scan clock, so this scheme suits designs with few test
// configurations. The router itself is combinational between ic/core_out
// and edt_in/oc. After reset the DSR address is 0.
module soc_ijtag
  import dsr_pkg::*;
#(
  parameter int unsigned CORE_TDR_W = 8
) (
  input  logic                   tck,
  input  logic                   trst_n,
  input  logic                   tms,
  input  logic                   tdi,
  output logic                   tdo,
  input  logic [N_IC-1:0]        ic,
  output logic [N_OC-1:0]        oc,
  output logic [N_EDT_IN-1:0]    edt_in,
  input  logic [N_CORE_OUT-1:0]  core_out,
  output logic [CORE_TDR_W-1:0]  c1_tdr,
  output logic [CORE_TDR_W-1:0]  c2_tdr,
  output dsr_addr_t              addr
);
  logic net_reset, net_sel, net_cap, net_sh, net_upd, net_so;

  tap_controller u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .net_reset, .net_sel, .net_capture(net_cap), .net_shift(net_sh),
    .net_update(net_upd), .net_so
  );

  // SIB chain
  logic [3:0] link;             // link[k]: scan input of SIB k
  logic [2:0] seg_si, seg_sel, seg_so;
  assign link[0] = tdi;

  for (genvar k = 0; k < 3; k++) begin : g_sib
    sib u_sib (
      .tck, .rst(net_reset), .sel(net_sel),
      .capture(net_cap), .shift(net_sh), .update(net_upd),
      .si(link[k]), .so(link[k+1]),
      .seg_si(seg_si[k]), .seg_sel(seg_sel[k]), .seg_so(seg_so[k])
    );
  end
  assign net_so = link[3];

  tdr #(.W(CORE_TDR_W)) u_tdr_c1 (
    .tck, .rst(net_reset), .sel(seg_sel[0]),
    .capture(net_cap), .shift(net_sh), .update(net_upd),
    .si(seg_si[0]), .so(seg_so[0]), .cap_data(c1_tdr), .q(c1_tdr)
  );

  tdr #(.W(CORE_TDR_W)) u_tdr_c2 (
    .tck, .rst(net_reset), .sel(seg_sel[1]),
    .capture(net_cap), .shift(net_sh), .update(net_upd),
    .si(seg_si[1]), .so(seg_so[1]), .cap_data(c2_tdr), .q(c2_tdr)
  );

  logic [ADDR_W-1:0] addr_q;
  tdr #(.W(ADDR_W)) u_tdr_dsr (
    .tck, .rst(net_reset), .sel(seg_sel[2]),
    .capture(net_cap), .shift(net_sh), .update(net_upd),
    .si(seg_si[2]), .so(seg_so[2]), .cap_data(addr_q), .q(addr_q)
  );
  assign addr = dsr_addr_t'(addr_q);

  dsr_network u_dsr (
    .addr, .ic, .edt_in, .core_out, .oc
  );
endmodule
