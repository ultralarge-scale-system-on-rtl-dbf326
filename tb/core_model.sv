// core_model: behavioural stand-in for an embedded core with its EDT
// decompressor and X-Press compactor, for testbenches only.
//
// It keeps one scan chain of LEN cells. On every rising clk edge with se high
// the chain takes the XOR of the core's EDT inputs; output 0 is the chain's
// last cell and output 1 (if present) its inverse, so that each compactor
// stream of a core is distinguishable. A bit entering at a shift edge
// appears on the outputs LEN shift edges later. Real decompression and
// compaction are not modelled.
module core_model #(
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_OUT = 1,
  parameter int unsigned LEN   = 8
) (
  input  logic             clk,
  input  logic             se,
  input  logic [N_IN-1:0]  edt_in,
  output logic [N_OUT-1:0] out
);
  logic [LEN-1:0] chain = '0;

  always_ff @(posedge clk)
    if (se) chain <= {chain[LEN-2:0], ^edt_in};

  always_comb
    for (int k = 0; k < N_OUT; k++) out[k] = k[0] ? ~chain[LEN-1] : chain[LEN-1];
endmodule
