// tb_out_dsr: exhaustive check of the output DSR over all 256 address words,
// each with several random core output patterns, against the reference.
module tb_out_dsr;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  logic [N_CORE_OUT-1:0] core_out;
  sel_t [N_OC-1:0]       os;
  logic [N_OC-1:0]       oc;
  int checks = 0, failures = 0;

  out_dsr dut (.core_out, .os, .oc);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int r = 0; r < 8; r++) begin
        os = 8'(a);
        core_out = (r == 0) ? 8'h00 : (r == 1) ? 8'hff : 8'($urandom);
        #1;
        checks++;
        if (oc !== ref_oc(core_out, 8'(a))) begin
          failures++;
          $display("mismatch os=%b co=%b oc=%b expected %b", 8'(a), core_out, oc, ref_oc(core_out, 8'(a)));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
