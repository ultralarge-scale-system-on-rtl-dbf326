// tdr: IJTAG test data register with a parallel update stage.
//
// W shift cells form a scan segment from si (entering at bit W-1) to so
// (bit 0). Capture copies cap_data into the shift cells, shift moves them one
// place toward so, and update transfers the shift cells to the update
// register q in one step. Because q only changes on update, the next
// configuration can be shifted in while the present one is still in use.
// Strobes act on the rising edge of tck when sel is high; rst (synchronous) loads RST_VAL
// into q. W must be at least 2.
module tdr #(
  parameter int unsigned   W       = 14,
  parameter logic [W-1:0]  RST_VAL = '0
) (
  input  logic         tck,
  input  logic         rst,
  input  logic         sel,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic         si,
  output logic         so,
  input  logic [W-1:0] cap_data,
  output logic [W-1:0] q
);
  logic [W-1:0] sr;

  always_ff @(posedge tck) begin
    if (rst) begin
      sr <= '0;
      q  <= RST_VAL;
    end else if (sel) begin
      if (capture)     sr <= cap_data;
      else if (shift)  sr <= {si, sr[W-1:1]};
      else if (update) q  <= sr;
    end
  end

  assign so = sr[0];
endmodule
