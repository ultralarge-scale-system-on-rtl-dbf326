// tb_in_dsr: exhaustive check of the input DSR (every address word and
// every channel pattern) against the pin-by-pin reference model. Also counts
// how often an OR gate passed data from each of its two channels.
module tb_in_dsr;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  logic [N_IC-1:0]     ic;
  sel_t [N_IC-1:0]     is;
  logic [N_EDT_IN-1:0] edt_in;
  int checks = 0, failures = 0;

  in_dsr dut (.ic, .is, .edt_in);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int d = 0; d < 8; d++) begin
        is = sel_t'(0);
        {is[2], is[1], is[0]} = 6'(a);
        ic = 3'(d);
        #1;
        checks++;
        if (edt_in !== ref_edt(ic, 6'(a))) begin
          failures++;
          $display("mismatch is=%b ic=%b edt_in=%b expected %b", 6'(a), ic, edt_in, ref_edt(ic, 6'(a)));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
