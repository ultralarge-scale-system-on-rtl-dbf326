// pipe_ctrl_stage: control pipeline of one ATE input channel.
//
// LEN flip-flops sit in series in the scan channel, so every bit the ATE
// sends on the channel passes through them on its way to the input DSR.
// At the end of each pattern upload the last LEN bits sent remain in the
// flops; they are the control bits (n demultiplexer bits followed by m
// multiplexer bits) and upd copies them into shadow registers, which steer
// the router while the next pattern is shifted. The shadow stage keeps the
// configuration from being disturbed by test data moving through the flops.
//
// Timing: while se is high the stage shifts once per clk, entering at bit
// LEN-1 and leaving at bit 0, so dout is din delayed by LEN shift cycles.
// upd is a one-cycle strobe at the end of an upload. Synchronous active-high
// rst clears both stages.
module pipe_ctrl_stage #(
  parameter int unsigned LEN = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           se,
  input  logic           upd,
  input  logic           din,
  output logic           dout,
  output logic [LEN-1:0] shadow
);
  logic [LEN-1:0] pipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      pipe   <= '0;
      shadow <= '0;
    end else begin
      if (se)  pipe   <= {din, pipe[LEN-1:1]};
      if (upd) shadow <= pipe;
    end
  end

  assign dout = pipe[0];
endmodule
