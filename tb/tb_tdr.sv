// tb_tdr: shift random words through a 14-bit TDR and check serial order,
// that the update register holds until update, capture of parallel data and
// that nothing moves while the register is not selected.
module tb_tdr;
  localparam int W = 14;
  logic tck = 0, rst = 1, sel = 1, capture = 0, shift = 0, update = 0, si = 0;
  logic so;
  logic [W-1:0] cap_data = '0, q;
  int checks = 0, failures = 0;

  tdr #(.W(W), .RST_VAL(14'h2a5)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk1(input logic c, input logic s, input logic u, input logic d);
    capture = c; shift = s; update = u; si = d;
    #5 tck = 1;
    #5 tck = 0;
    capture = 0; shift = 0; update = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk1(0, 0, 0, 0);
    rst = 0;
    chk(q == 14'h2a5, "reset value");
    for (int n = 0; n < 20; n++) begin
      logic [W-1:0] w, old;
      w = W'($urandom);
      old = q;
      for (int b = 0; b < W; b++) begin
        clk1(0, 1, 0, w[b]);
        chk(q == old, "update register holds during shift");
      end
      // after W shifts bit 0 of the word sits at so
      chk(so == w[0], "serial order");
      clk1(0, 0, 1, 0);
      chk(q == w, "update transfers word");
      // capture then shift out
      cap_data = W'($urandom);
      clk1(1, 0, 0, 0);
      for (int b = 0; b < W; b++) begin
        chk(so == cap_data[b], "captured bit shifted out");
        clk1(0, 1, 0, 0);
      end
      chk(q == w, "capture/shift leave q alone");
    end
    sel = 0;
    clk1(0, 0, 1, 0);
    begin
      logic [W-1:0] q_prev;
      q_prev = q;
      clk1(1, 0, 0, 0);
      clk1(0, 1, 0, 1);
      clk1(0, 0, 1, 0);
      chk(q == q_prev, "no update when not selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
