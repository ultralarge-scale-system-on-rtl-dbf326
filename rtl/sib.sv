// sib: IEEE 1687 segment insertion bit.
//
// A one-bit shift cell with an update latch. While the update bit is 0 the
// SIB is a single bit in the scan path (si -> SIB -> so). Once a 1 has been
// shifted in and updated, the hosted segment (here a TDR) is spliced in
// front of the SIB: si -> segment -> SIB -> so, and the segment's select is
// raised. Capture loads the cell with its own update bit, so a read-back
// shows whether the segment is open. All strobes act on the rising edge of
// tck; rst (Test-Logic-Reset, synchronous) closes the segment.
module sib (
  input  logic tck,
  input  logic rst,
  input  logic sel,          // this SIB is on the active scan path
  input  logic capture,
  input  logic shift,
  input  logic update,
  input  logic si,
  output logic so,
  // hosted segment
  output logic seg_si,
  output logic seg_sel,
  input  logic seg_so
);
  logic sr, upd;

  always_ff @(posedge tck) begin
    if (rst) begin
      sr  <= 1'b0;
      upd <= 1'b0;
    end else if (sel) begin
      if (capture)     sr  <= upd;
      else if (shift)  sr  <= upd ? seg_so : si;
      else if (update) upd <= sr;
    end
  end

  assign so      = sr;
  assign seg_si  = si;
  assign seg_sel = sel && upd;
endmodule
