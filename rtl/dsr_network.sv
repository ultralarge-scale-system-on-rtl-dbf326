// dsr_network: the complete dynamic scan router, input side and output side,
// steered by one packed address word (dsr_pkg::dsr_addr_t).
//
// The address word is supplied by one of the control-delivery schemes
// (IJTAG, dedicated control chain or pipeline). Purely combinational.
module dsr_network
  import dsr_pkg::*;
(
  input  dsr_addr_t             addr,
  input  logic [N_IC-1:0]       ic,
  output logic [N_EDT_IN-1:0]   edt_in,
  input  logic [N_CORE_OUT-1:0] core_out,
  output logic [N_OC-1:0]       oc
);
  in_dsr  u_in  (.ic(ic), .is(addr.is), .edt_in(edt_in));
  out_dsr u_out (.core_out(core_out), .os(addr.os), .oc(oc));
endmodule
