// out_dsr: output dynamic scan router.
//
// Each ATE output channel has a 4-input multiplexer; its address register
// os[j] picks which core compactor stream is observed. Core outputs fan out
// to two multiplexers (dsr_pkg::OUT_MAP), which gives the scheduler a choice
// of output channel for every stream. Purely combinational.
module out_dsr
  import dsr_pkg::*;
(
  input  logic [N_CORE_OUT-1:0] core_out,
  input  sel_t [N_OC-1:0]       os,
  output logic [N_OC-1:0]       oc
);
  for (genvar j = 0; j < N_OC; j++) begin : g_mux
    logic [N_MUX_IN-1:0] mux_in;
    for (genvar k = 0; k < N_MUX_IN; k++) begin : g_in
      assign mux_in[k] = core_out[OUT_MAP[j][k]];
    end
    chan_mux #(.N_IN(N_MUX_IN)) u_mux (
      .in(mux_in), .sel(os[j]), .out(oc[j])
    );
  end
endmodule
