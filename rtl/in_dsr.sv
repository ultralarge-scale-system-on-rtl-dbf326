// in_dsr: input dynamic scan router.
//
// One demultiplexer per ATE input channel sends that channel to one of four
// core EDT inputs, chosen by its address register is[i]. EDT inputs reachable
// from two channels are driven through a 2-input OR gate, which lets the
// low-order EDT inputs, the ones used most, take data from either channel.
// The wiring comes from dsr_pkg::IN_MAP. Purely combinational; the address
// must be held stable during shift.
module in_dsr
  import dsr_pkg::*;
(
  input  logic [N_IC-1:0]      ic,
  input  sel_t [N_IC-1:0]      is,
  output logic [N_EDT_IN-1:0]  edt_in
);
  logic [N_IC-1:0][N_DMX_OUT-1:0] dmx_out;

  for (genvar i = 0; i < N_IC; i++) begin : g_dmx
    chan_demux #(.N_OUT(N_DMX_OUT)) u_dmx (
      .ch (ic[i]), .sel(is[i]), .out(dmx_out[i])
    );
  end

  // OR network: an EDT pin is the OR of every demux output wired to it.
  always_comb begin
    edt_in = '0;
    for (int unsigned i = 0; i < N_IC; i++)
      for (int unsigned o = 0; o < N_DMX_OUT; o++)
        edt_in[IN_MAP[i][o]] = edt_in[IN_MAP[i][o]] | dmx_out[i][o];
  end
endmodule
