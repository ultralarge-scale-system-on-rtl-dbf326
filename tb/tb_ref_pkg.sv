// tb_ref_pkg: reference model of the dynamic scan router for the testbenches.
//
// Written pin by pin from the connection diagram, independently of the
// table form used in dsr_pkg, so that a wrong table entry shows up as a
// mismatch. Also holds the shared check counters' print helper format.
package tb_ref_pkg;

  // EDT input pins: 0:C1.in0 1:C1.in1 2:C2.in0 3:C3.in0 4:C3.in1 5:C4.in0 6:C5.in0
  // is[i] is the 2-bit address of the demux of channel IC(i+1).
  function automatic logic [6:0] ref_edt(logic [2:0] ic, logic [5:0] is);
    logic [1:0] a1, a2, a3;
    logic [6:0] e;
    a1 = is[1:0]; a2 = is[3:2]; a3 = is[5:4];
    e[0] = (ic[0] && a1 == 2'd0) || (ic[1] && a2 == 2'd0);  // OR gate of C1
    e[1] =  ic[2] && a3 == 2'd0;                            // direct from IC3
    e[2] = (ic[0] && a1 == 2'd1) || (ic[1] && a2 == 2'd1);  // OR gate of C2
    e[3] = (ic[0] && a1 == 2'd2) || (ic[2] && a3 == 2'd1);  // OR gate of C3
    e[4] =  ic[1] && a2 == 2'd2;                            // direct from IC2
    e[5] = (ic[0] && a1 == 2'd3) || (ic[2] && a3 == 2'd2);  // OR gate of C4
    e[6] = (ic[1] && a2 == 2'd3) || (ic[2] && a3 == 2'd3);  // OR gate of C5
    return e;
  endfunction

  // core streams: 0:C1.o0 1:C1.o1 2:C2.o0 3:C3.o0 4:C3.o1 5:C4.o0 6:C5.o0 7:C5.o1
  function automatic logic [3:0] ref_oc(logic [7:0] co, logic [7:0] os);
    logic [3:0] oc;
    logic [3:0] upper, lower;
    upper = {co[6], co[3], co[2], co[0]};   // seen by OC1 and OC2
    lower = {co[7], co[5], co[4], co[1]};   // seen by OC3 and OC4
    oc[0] = upper[os[1:0]];
    oc[1] = upper[os[3:2]];
    oc[2] = lower[os[5:4]];
    oc[3] = lower[os[7:6]];
    return oc;
  endfunction

endpackage
