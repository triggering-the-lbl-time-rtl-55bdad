// tb_endcap_trigger -- one endcap driven through its test-pattern RAMs.
// Event 1: an inclined track in sector 0 (wire 183 at drift slice 2 down to
// wire 0 at slice 42). Event 2: a track at 90 degrees in sector 2 (all wires
// within slices 55-57). The testbench computes the supersector wire bits
// (sector s OR sector s-1) and the majority bits from the loaded patterns
// with a sliding-window sum, and compares them with what the recording
// memories captured at levels 0 and 1. It also checks which supersectors
// give a pretrigger (TPCF_ij), a ripple (TPCS_ij) and a majority trigger
// (TPCM_ij), and that the others stay silent.
module tb_endcap_trigger;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, run = 0, tick, tf, tm;
  logic [1:0] phase = 0;
  slice_t k = 0;
  config_t cfg;
  logic [N_IDC-1:0] idc_a;
  logic [N_SECTORS-1:0][NW-1:0] wires = '0;
  logic tp_we = 0;
  logic [2:0] tp_sector = 0;
  logic [5:0] tp_addr = 0, rd_addr = 0, rd_word = 0;
  logic [NW-1:0] tp_data = 0;
  rec_level_e rd_level = LVL_WIRES;
  logic [31:0] rd_data;
  logic [N_SECTORS-1:0][N_GROUPS-1:0] m;
  logic [N_SECTORS-1:0] tpf, tpcf_ij, tpcs_ij, tpcm_ij;
  int checks = 0, failures = 0;

  endcap_trigger dut (.*);
  always #5 clk = ~clk;
  assign tick = run && phase == 2'd3;
  assign tf   = run && k >= 2 && k < 10;
  assign tm   = run && k >= 50 && k < 67;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NW-1:0] pat [N_SECTORS][N_SLICES];

  task automatic load_patterns();
    for (int s = 0; s < N_SECTORS; s++)
      for (int d = 0; d < N_SLICES; d++) begin
        @(negedge clk);
        tp_we = 1; tp_sector = 3'(s); tp_addr = 6'(d); tp_data = pat[s][d];
      end
    @(negedge clk) tp_we = 0;
  endtask

  task automatic run_cycle(output logic [N_SECTORS-1:0] seen_f, seen_s, seen_m);
    seen_f = 0; seen_s = 0; seen_m = 0;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0; run = 1; k = 0; phase = 0;
    for (int c = 0; c < RUN_SLICES * 4; c++) begin
      #1;
      if (tf) seen_f |= tpcf_ij;
      seen_s |= tpcs_ij;
      if (tm) seen_m |= tpcm_ij;
      @(negedge clk);
      phase = phase + 1'b1;
      if (phase == 0) k = k + 1'b1;
    end
    run = 0;
  endtask

  function automatic logic [NW-1:0] super_bits(int s, int d);
    return pat[s][d] | pat[(s + N_SECTORS - 1) % N_SECTORS][d];
  endfunction

  task automatic read_word(rec_level_e lvl, int d, int w, output logic [31:0] v);
    @(negedge clk) rd_level = lvl; rd_addr = 6'(d); rd_word = 6'(w);
    @(negedge clk) v = rd_data;
  endtask

  task automatic check_records();
    logic [6*NW-1:0] l0;
    logic [6*24-1:0] l1;
    logic [31:0] v;
    int sum;
    logic [NW-1:0] sb;
    for (int d = 0; d < N_SLICES; d++) begin
      for (int w = 0; w < (6*NW+31)/32; w++) begin read_word(LVL_WIRES, d, w, v); l0[w*32 +: 32] = v; end
      for (int w = 0; w < (6*24+31)/32; w++) begin read_word(LVL_MAJ, d, w, v); l1[w*32 +: 32] = v; end
      for (int s = 0; s < N_SECTORS; s++) begin
        checks++;
        if (l0[s*NW +: NW] != super_bits(s, d)) begin
          failures++; $display("FAIL level0 slice %0d supersector %0d", d, s);
        end
        for (int n = 0; n < N_GROUPS; n++) begin
          sum = 0;
          for (int j = d - int'(cfg.delta[n]) + 1; j <= d; j++)
            if (j >= 0) begin sb = super_bits(s, j); sum += $countones(sb[n*8 +: 8]); end
          checks++;
          if (l1[s*24 + n] != (sum > int'(cfg.au_thresh[n]))) begin
            failures++; $display("FAIL M slice %0d ss %0d group %0d got %b sum %0d", d, s, n, l1[s*24+n], sum);
          end
        end
      end
    end
  endtask

  initial begin
    logic [N_SECTORS-1:0] sf, ss, sm;
    cfg = '0;
    for (int n = 0; n < N_GROUPS; n++) begin
      cfg.au_thresh[n] = 8'd3; cfg.delta[n] = 4'd4; cfg.os_width[n] = 5'd12;
    end
    cfg.pre_mask = 23'h7FF000;
    cfg.tpcm_thresh = {4'd4, 4'd4, 4'd4};
    cfg.acq_test = 1;
    idc_a = 12'b1000_0000_0000;   // A11 = A_2j-1 of supersector 0 only
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- event 1: inclined track in sector 0
    for (int s = 0; s < N_SECTORS; s++) for (int d = 0; d < N_SLICES; d++) pat[s][d] = '0;
    for (int w = 0; w < NW; w++) pat[0][2 + (w * 40) / NW][NW - 1 - w] = 1'b1;
    load_patterns();
    run_cycle(sf, ss, sm);
    check_records();
    checks++;
    if (ss != 6'b000011) begin failures++; $display("FAIL ripple supersectors %b", ss); end
    checks++;
    if (sf != 6'b000001) begin failures++; $display("FAIL pretrigger supersectors %b", sf); end
    checks++;
    if (sm != 6'b000000) begin failures++; $display("FAIL majority trigger on inclined track %b", sm); end
    // ---- event 2: 90-degree track in sector 2
    for (int s = 0; s < N_SECTORS; s++) for (int d = 0; d < N_SLICES; d++) pat[s][d] = '0;
    for (int w = 0; w < NW; w++) pat[2][55 + w % 3][w] = 1'b1;
    load_patterns();
    run_cycle(sf, ss, sm);
    check_records();
    checks++;
    if (sm != 6'b001100) begin failures++; $display("FAIL majority supersectors %b", sm); end
    checks++;
    if (sf != 6'b000000) begin failures++; $display("FAIL late track pretriggered %b", sf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
