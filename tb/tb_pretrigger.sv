// tb_pretrigger -- random majority bits, masks and IDC bits against the
// pretrigger equation TPF = OR(Mask&M), TPCF = TPF & (A_lo | A_hi).
module tb_pretrigger;
  import tpc_trig_pkg::*;
  logic [N_GROUPS-1:0] m, mask;
  logic idc_lo, idc_hi, tpf, tpcf;
  int checks = 0, failures = 0;
  pretrigger dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic e_tpf;
    for (int i = 0; i < 2000; i++) begin
      // sparse bits so that both outcomes occur
      m      = N_GROUPS'($urandom) & N_GROUPS'($urandom) & N_GROUPS'($urandom);
      mask   = N_GROUPS'($urandom) & N_GROUPS'($urandom);
      idc_lo = 1'($urandom);
      idc_hi = ($urandom_range(0, 3) == 0);
      #1;
      e_tpf = 1'b0;
      for (int n = 0; n < N_GROUPS; n++) if (m[n] && mask[n]) e_tpf = 1'b1;
      checks++;
      if (tpf != e_tpf || tpcf != (e_tpf && (idc_lo || idc_hi))) begin
        failures++;
        $display("FAIL m=%h mask=%h a=%b%b tpf=%b tpcf=%b", m, mask, idc_lo, idc_hi, tpf, tpcf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
