// chan_demux: one ATE input channel demultiplexer of the input DSR.
//
// The channel bit is routed to the output named by the address; all other
// outputs are held at 0, so that OR gates behind the demultiplexers can merge
// several channels onto one EDT input (only one of them is addressed at a
// time); holding them at 0 is this design's choice, the rest follows the
// channel-to-core demultiplexers of the router. Purely combinational.
module chan_demux #(
  parameter int unsigned N_OUT = 4
) (
  input  logic                       ch,
  input  logic [$clog2(N_OUT)-1:0]   sel,
  output logic [N_OUT-1:0]           out
);
  always_comb begin
    out = '0;
    out[sel] = ch;
  end
endmodule
