// tap_controller: IEEE 1149.1 test access port for the IJTAG network.
//
// The 16-state TAP state machine advances on the rising edge of tck under
// tms; trst_n resets it asynchronously to Test-Logic-Reset. A 4-bit
// instruction register selects either BYPASS (1111, also the reset value) or
// IJTAG (1000), which puts the IEEE 1687 network of SIBs and TDRs between
// tdi and tdo. For the selected network the controller issues capture, shift
// and update strobes, each valid for the rising tck edge spent in
// Capture-DR, Shift-DR and Update-DR. tdo is re-timed on the falling edge of
// tck as 1149.1 requires.
//
// The standard TAP is the access point the IJTAG scheme builds on; the
// instruction codes, the IR width and updating on the rising edge of
// Update-DR (rather than its falling edge) are this design's choices.
module tap_controller #(
  parameter int unsigned        IR_W   = 4,
  parameter logic [IR_W-1:0]    IJTAG  = 4'b1000,
  parameter logic [IR_W-1:0]    BYPASS = '1
) (
  input  logic tck,
  input  logic trst_n,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  // IJTAG network side
  output logic net_reset,    // Test-Logic-Reset reached
  output logic net_sel,      // IJTAG instruction active
  output logic net_capture,
  output logic net_shift,
  output logic net_update,
  input  logic net_so        // last bit of the network
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_state_t;

  tap_state_t state, nxt;

  always_comb begin
    unique case (state)
      TLR:    nxt = tms ? TLR    : RTI;
      RTI:    nxt = tms ? SEL_DR : RTI;
      SEL_DR: nxt = tms ? SEL_IR : CAP_DR;
      CAP_DR: nxt = tms ? EX1_DR : SH_DR;
      SH_DR:  nxt = tms ? EX1_DR : SH_DR;
      EX1_DR: nxt = tms ? UPD_DR : PA_DR;
      PA_DR:  nxt = tms ? EX2_DR : PA_DR;
      EX2_DR: nxt = tms ? UPD_DR : SH_DR;
      UPD_DR: nxt = tms ? SEL_DR : RTI;
      SEL_IR: nxt = tms ? TLR    : CAP_IR;
      CAP_IR: nxt = tms ? EX1_IR : SH_IR;
      SH_IR:  nxt = tms ? EX1_IR : SH_IR;
      EX1_IR: nxt = tms ? UPD_IR : PA_IR;
      PA_IR:  nxt = tms ? EX2_IR : PA_IR;
      EX2_IR: nxt = tms ? UPD_IR : SH_IR;
      UPD_IR: nxt = tms ? SEL_DR : RTI;
      default: nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TLR;
    else         state <= nxt;

  // Instruction register: shift stage and active instruction.
  logic [IR_W-1:0] ir_sr, ir;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sr <= '0;
      ir    <= BYPASS;
    end else if (nxt == TLR) begin
      ir <= BYPASS;                          // instruction reset on entry to TLR
    end else begin
      unique case (state)
        CAP_IR: ir_sr <= IR_W'(1);           // ...01 as the standard requires
        SH_IR:  ir_sr <= {tdi, ir_sr[IR_W-1:1]};
        UPD_IR: ir <= ir_sr;
        default: ;
      endcase
    end
  end

  // BYPASS register for any instruction but IJTAG.
  logic bypass_q;
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)              bypass_q <= 1'b0;
    else if (state == CAP_DR) bypass_q <= 1'b0;
    else if (state == SH_DR)  bypass_q <= tdi;

  assign net_sel     = (ir == IJTAG);
  assign net_reset   = (state == TLR);
  assign net_capture = net_sel && (state == CAP_DR);
  assign net_shift   = net_sel && (state == SH_DR);
  assign net_update  = net_sel && (state == UPD_DR);

  logic tdo_d;
  always_comb begin
    if (state == SH_IR)      tdo_d = ir_sr[0];
    else if (net_sel)        tdo_d = net_so;
    else                     tdo_d = bypass_q;
  end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_d;
endmodule
