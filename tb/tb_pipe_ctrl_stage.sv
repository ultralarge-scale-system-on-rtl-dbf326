// tb_pipe_ctrl_stage: random shifting with gaps in se. Checks that dout is
// din delayed by exactly LEN shift cycles, that the shadow takes the last LEN
// bits shifted (newest at bit LEN-1) on upd and holds otherwise.
module tb_pipe_ctrl_stage;
  localparam int LEN = 4;
  logic clk = 0, rst = 1, se = 0, upd = 0, din = 0;
  logic dout;
  logic [LEN-1:0] shadow;
  int checks = 0, failures = 0;
  logic hist [$];             // bits shifted so far
  logic [LEN-1:0] exp_shadow;

  pipe_ctrl_stage #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < LEN; k++) hist.push_back(1'b0);   // reset contents
    exp_shadow = '0;
    for (int n = 0; n < 600; n++) begin
      se  = ($urandom % 4) != 0;
      upd = ($urandom % 7) == 0;
      din = 1'($urandom);
      // before the edge: dout is the bit shifted LEN shift cycles ago
      chk(dout == hist[hist.size() - LEN], "dout delayed by LEN shifts");
      chk(shadow == exp_shadow, "shadow holds");
      if (upd)
        for (int k = 0; k < LEN; k++) exp_shadow[LEN-1-k] = hist[hist.size()-1-k];
      if (se) hist.push_back(din);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
