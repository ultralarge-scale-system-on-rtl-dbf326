// tb_dsr_network: random address words and data through the whole router;
// checks that the packed address word splits into the right demux and mux
// fields and that both directions route as the reference says.
module tb_dsr_network;
  import dsr_pkg::*;
  import tb_ref_pkg::*;

  dsr_addr_t             addr;
  logic [N_IC-1:0]       ic;
  logic [N_EDT_IN-1:0]   edt_in;
  logic [N_CORE_OUT-1:0] core_out;
  logic [N_OC-1:0]       oc;
  int checks = 0, failures = 0;

  dsr_network dut (.addr, .ic, .edt_in, .core_out, .oc);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [13:0] a;
      a = 14'($urandom);
      addr = dsr_addr_t'(a);
      ic = 3'($urandom);
      core_out = 8'($urandom);
      #1;
      checks += 2;
      // low 6 bits: demux addresses, high 8 bits: mux addresses
      if (edt_in !== ref_edt(ic, a[5:0])) begin
        failures++;
        $display("edt mismatch addr=%h ic=%b got %b", a, ic, edt_in);
      end
      if (oc !== ref_oc(core_out, a[13:6])) begin
        failures++;
        $display("oc mismatch addr=%h co=%b got %b", a, core_out, oc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
