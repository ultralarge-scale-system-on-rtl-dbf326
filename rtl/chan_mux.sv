// chan_mux: one ATE output channel multiplexer of the output DSR.
//
// Puts the core output stream named by the address on the output channel.
// Purely combinational.
module chan_mux #(
  parameter int unsigned N_IN = 4
) (
  input  logic [N_IN-1:0]           in,
  input  logic [$clog2(N_IN)-1:0]   sel,
  output logic                      out
);
  assign out = in[sel];
endmodule
