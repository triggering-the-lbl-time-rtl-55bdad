// tb_final_decision -- random supersector results and windows against the
// gated ORs TPCF = TF&OR(TPCF_ij), TPCS = TS&OR(TPCS_ij), TPCM = TM&OR(TPCM_ij),
// and the per-cycle pretrigger and trigger flags reported at `done`.
module tb_final_decision;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, tick = 0, done = 0, tf = 0, ts = 0, tm = 0, ext_pretrig = 0;
  logic [N_ENDCAPS-1:0][N_SECTORS-1:0] tpcf_ij = '0, tpcs_ij = '0, tpcm_ij = '0;
  logic tpcf, tpcs, tpcm, pretrig_seen, trigger, trig_tpcs, trig_tpcm, trig_valid;
  int checks = 0, failures = 0;
  final_decision dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [11:0] sparse();
    logic [11:0] v = 0;
    if ($urandom_range(0, 5) == 0) v[$urandom_range(0, 11)] = 1'b1;
    return v;
  endfunction
  initial begin
    logic pf, sf, mf;
    int n_trig;
    n_trig = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 100; cyc++) begin
      @(negedge clk) init = 1;
      @(negedge clk) init = 0;
      pf = 0; sf = 0; mf = 0;
      for (int s = 0; s < 20; s++) begin
        tf = (s < 5); ts = (s >= 12); tm = (s >= 10);
        tpcf_ij = sparse(); tpcs_ij = sparse(); tpcm_ij = sparse();
        ext_pretrig = ($urandom_range(0, 20) == 0);
        tick = 1; done = (s == 19);
        #1;
        checks++;
        if (tpcf != (tf && |tpcf_ij) || tpcs != (ts && |tpcs_ij) || tpcm != (tm && |tpcm_ij) ||
            pretrig_seen != (pf || (tf && (|tpcf_ij || ext_pretrig)))) begin
          failures++;
          $display("FAIL gating cycle %0d slice %0d", cyc, s);
        end
        pf = pf || (tf && (|tpcf_ij || ext_pretrig));
        sf = sf || tpcs;
        mf = mf || tpcm;
        @(negedge clk);
        tick = 0; done = 0;
      end
      checks++;
      if (trig_valid !== 1'b1 || trigger != (sf || mf) || trig_tpcs != sf || trig_tpcm != mf) begin
        failures++;
        $display("FAIL decision cycle %0d: %b%b%b exp %b%b", cyc, trigger, trig_tpcs, trig_tpcm, sf, mf);
      end
      if (trigger) n_trig++;
      @(negedge clk);
      checks++;
      if (trig_valid !== 1'b0) begin failures++; $display("FAIL trig_valid not a pulse"); end
    end
    checks++;
    if (n_trig == 0 || n_trig == 100) begin failures++; $display("FAIL no variety: %0d triggers", n_trig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
