// dsr_pkg: sizes and wiring tables of the dynamic scan router (DSR).
//
// The DSR connects ATE scan channels to the EDT (embedded deterministic test)
// inputs and X-Press compactor outputs of the embedded cores. Its size
// follows the reference configuration: three ATE input channels IC1..IC3,
// five cores C1..C5 and four ATE output channels OC1..OC4, every
// demultiplexer and multiplexer addressed by a 2-bit register.
//
// The wiring tables below are this design's reading of the reference
// connection diagram. They obey the stated rule that the n EDT inputs of a
// core hang on n different ATE channels and that each ATE channel serves
// about the same number of cores. Numbering (index = table entry):
//   EDT input pins   0:C1.in0 1:C1.in1 2:C2.in0 3:C3.in0 4:C3.in1 5:C4.in0 6:C5.in0
//   core out streams 0:C1.o0  1:C1.o1  2:C2.o0  3:C3.o0  4:C3.o1  5:C4.o0  6:C5.o0  7:C5.o1
// An EDT pin fed by two demultiplexer outputs sits behind an OR gate.
// Which physical input of a demultiplexer or multiplexer address 0 means is
// this design's choice (topmost in the diagram = 0).
package dsr_pkg;

  localparam int unsigned N_IC       = 3;  // ATE input channels
  localparam int unsigned N_OC       = 4;  // ATE output channels
  localparam int unsigned N_CORES    = 5;
  localparam int unsigned SEL_W      = 2;  // address bits per demux / mux
  localparam int unsigned N_DMX_OUT  = 1 << SEL_W;
  localparam int unsigned N_MUX_IN   = 1 << SEL_W;
  localparam int unsigned N_EDT_IN   = 7;  // EDT input pins over all cores
  localparam int unsigned N_CORE_OUT = 8;  // compactor output streams over all cores

  typedef logic [SEL_W-1:0] sel_t;

  // All DSR address registers as one word: input demux addresses in the low
  // bits, output mux addresses above them.
  typedef struct packed {
    sel_t [N_OC-1:0] os;   // os[j]: address of output multiplexer j
    sel_t [N_IC-1:0] is;   // is[i]: address of input demultiplexer i
  } dsr_addr_t;

  localparam int unsigned ADDR_W = $bits(dsr_addr_t);  // 14

  typedef int unsigned dmx_map_t [N_IC][N_DMX_OUT];
  typedef int unsigned mux_map_t [N_OC][N_MUX_IN];

  // IN_MAP[i][o]: EDT input pin driven by output o of input demux i.
  localparam dmx_map_t IN_MAP = '{
    '{0, 2, 3, 5},   // IC1 -> C1.in0, C2.in0, C3.in0, C4.in0
    '{0, 2, 4, 6},   // IC2 -> C1.in0, C2.in0, C3.in1, C5.in0
    '{1, 3, 5, 6}    // IC3 -> C1.in1, C3.in0, C4.in0, C5.in0
  };

  // OUT_MAP[j][k]: core output stream on input k of output mux j. Every
  // stream fans out to two multiplexers.
  localparam mux_map_t OUT_MAP = '{
    '{0, 2, 3, 6},   // OC1 <- C1.o0, C2.o0, C3.o0, C5.o0
    '{0, 2, 3, 6},   // OC2 <- same set
    '{1, 4, 5, 7},   // OC3 <- C1.o1, C3.o1, C4.o0, C5.o1
    '{1, 4, 5, 7}    // OC4 <- same set
  };

  // Control-chain and pipeline schemes: the address bits of output mux j
  // travel in the chain of input channel OC_OWNER(j). OC1..OC3 pair with
  // IC1..IC3; OC4, which has no partner, joins IC3.
  function automatic int unsigned oc_owner(int unsigned j);
    return (j < N_IC) ? j : N_IC - 1;
  endfunction

  function automatic int unsigned n_owned(int unsigned i);
    int unsigned n = 0;
    for (int unsigned j = 0; j < N_OC; j++) if (oc_owner(j) == i) n++;
    return n;
  endfunction

  // Position of output mux j among the muxes owned by the same channel.
  function automatic int unsigned own_pos(int unsigned j);
    int unsigned n = 0;
    for (int unsigned k = 0; k < j; k++) if (oc_owner(k) == oc_owner(j)) n++;
    return n;
  endfunction

  // Control bits carried by channel i: its demux address plus the addresses
  // of the output muxes it owns (n + m of the pipeline scheme).
  function automatic int unsigned chain_len(int unsigned i);
    return SEL_W * (1 + n_owned(i));
  endfunction

endpackage
