// tb_tpc_trigger_top -- end-to-end test of the whole trigger at full size
// (2 endcaps x 6 sectors x 184 wires, 23 radial groups, 64 slices).
// Cycles:
//   1. test-pattern track inclined across endcap 0 sector 0, with the IDC
//      section in coincidence: prompt pretrigger TPCF, ripple trigger TPCS.
//   2. empty event: no pretrigger, the cycle aborts and clears.
//   3. discriminator wires (acquisition mode), external pretrigger, a
//      90-degree track in endcap 1 sector 3: majority trigger TPCM only.
//   4. a crossing while `hold` is high starts nothing.
// The decision must be ready 67 slices plus one clock (16.81 us at 4 clocks
// per 250 ns slice) after the crossing, within the 17 us the trigger is allowed.
// Recording memories are read back and compared with the injected pattern.
// Every mechanism is counted; one that never happened is a failure.
module tb_tpc_trigger_top;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, bx = 0, hold = 0, ext_pretrig = 0;
  logic [N_IDC-1:0] idc_a = '0;
  config_t cfg;
  windows_t win;
  logic [N_ENDCAPS-1:0][N_SECTORS-1:0][NW-1:0] wires = '0;
  logic tp_we = 0, tp_endcap = 0, rd_endcap = 0;
  logic [2:0] tp_sector = 0;
  logic [5:0] tp_addr = 0, rd_addr = 0, rd_word = 0;
  logic [NW-1:0] tp_data = '0;
  rec_level_e rd_level = LVL_WIRES;
  logic [31:0] rd_data;
  logic busy, analog_clear, aborted, tpcf, tpcs, tpcm, trigger, trig_tpcs, trig_tpcm, trig_valid;
  slice_t slice;
  int checks = 0, failures = 0;

  tpc_trigger_top dut (.*);
  always #31.25ns clk = ~clk;   // 16 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_abort = 0, n_clear = 0, n_tpcf = 0, n_ext = 0, n_tpcs = 0, n_tpcm = 0,
      n_testmode = 0, n_wiremode = 0, n_readout = 0, n_m_off = 0, n_hold = 0,
      n_sector_or = 0;

  always @(posedge clk) begin
    if (aborted) n_abort++;
    if (analog_clear) n_clear++;
    if (tpcf) n_tpcf++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [NW-1:0] pat [N_SLICES];

  task automatic load_sector(int ec, int sec);
    for (int d = 0; d < N_SLICES; d++) begin
      @(negedge clk);
      tp_we = 1; tp_endcap = 1'(ec); tp_sector = 3'(sec); tp_addr = 6'(d); tp_data = pat[d];
    end
    @(negedge clk) tp_we = 0;
  endtask

  task automatic clear_all();
    for (int d = 0; d < N_SLICES; d++) pat[d] = '0;
    for (int ec = 0; ec < 2; ec++) for (int s = 0; s < 6; s++) load_sector(ec, s);
  endtask

  // Start a cycle and wait for its end; returns the clocks from bx to the
  // decision (or to the abort).
  task automatic run_cycle(output int clocks, output logic was_aborted);
    @(negedge clk) bx = 1;
    @(negedge clk) bx = 0;
    clocks = 1; was_aborted = 0;
    while (!trig_valid && clocks < 2000) begin
      if (aborted) was_aborted = 1;
      @(negedge clk); clocks++;
      if (was_aborted && !analog_clear && !busy) break;
    end
  endtask

  initial begin
    int clocks;
    logic ab;
    static slice_t prev_slice = '1;
    logic [31:0] v;
    logic [35*32-1:0] l0;
    logic [N_SECTORS*24-1:0] l1;
    logic [N_SECTORS*24-1:0] l1_prev;
    cfg = '0;
    for (int n = 0; n < N_GROUPS; n++) begin
      cfg.au_thresh[n] = 8'd3; cfg.delta[n] = 4'd4; cfg.os_width[n] = 5'd12;
    end
    cfg.pre_mask = 23'h7FF000;   // radial groups 12..22 may pretrigger
    cfg.tpcm_thresh = {4'd4, 4'd4, 4'd4};
    cfg.r1_enable = 1;
    cfg.acq_test = 1;
    win = WINDOWS_DEFAULT;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------------ 1: inclined track
    clear_all();
    for (int d = 0; d < N_SLICES; d++) pat[d] = '0;
    for (int w = 0; w < NW; w++) pat[2 + (w * 48) / NW][NW - 1 - w] = 1'b1;
    load_sector(0, 0);
    idc_a = 12'b0000_0000_0001;   // A0: supersector 0 of either endcap
    run_cycle(clocks, ab);
    n_testmode++;
    check(!ab && trig_valid, "cycle 1 completes");
    check(clocks == RUN_SLICES * SLICE_CLKS + 1, "decision 67 slices after crossing");
    $display("cycle 1: %0d clocks from crossing to decision", clocks);
    check(real'(clocks) * 62.5 <= 17000.0, "decision within 17 us");
    check(trigger && trig_tpcs && !trig_tpcm, "cycle 1 is a ripple trigger");
    if (trig_tpcs) n_tpcs++;
    // recording memories: level 0 of endcap 0 holds sector 0 (supersector 0)
    // and, ORed, supersector 1
    rd_endcap = 0;
    for (int d = 0; d < N_SLICES; d++) begin
      for (int w = 0; w < 35; w++) begin
        @(negedge clk) rd_level = LVL_WIRES; rd_addr = 6'(d); rd_word = 6'(w);
        @(negedge clk) l0[w * 32 +: 32] = rd_data;
      end
      n_readout++;
      for (int ss = 0; ss < 2; ss++) begin
        check(l0[ss * NW +: NW] == pat[d], "recorded wire bits match the test pattern");
        if (ss == 1 && l0[ss * NW +: NW] == pat[d] && pat[d] != '0) n_sector_or++;
      end
    end
    // majority bits must switch off again once hits leave the window
    l1_prev = '0;
    for (int d = 0; d < N_SLICES; d++) begin
      for (int w = 0; w < 5; w++) begin
        @(negedge clk) rd_level = LVL_MAJ; rd_addr = 6'(d); rd_word = 6'(w);
        @(negedge clk) l1[w * 32 +: 32] = rd_data;
      end
      for (int b = 0; b < N_SECTORS * 24; b++) if (l1_prev[b] && !l1[b]) n_m_off++;
      l1_prev = l1;
    end

    // ------------------------------------------------ 2: empty event aborts
    clear_all();
    idc_a = '0;
    run_cycle(clocks, ab);
    check(ab, "empty event aborts");
    check(!trig_valid && !trigger, "no decision for an aborted cycle");

    // ------------------------------------------------ 3: wires, 90-degree track
    cfg.acq_test = 0;
    @(negedge clk) bx = 1;
    @(negedge clk) bx = 0;
    clocks = 1;
    while (!trig_valid && clocks < 2000) begin
      // external pretrigger during the TF window
      ext_pretrig = (slice == 7'd4);
      if (ext_pretrig) n_ext++;
      // discriminator pulses: wire w of endcap 1 sector 3 fires in slice 55 + w%3
      wires = '0;
      if (busy && slice != prev_slice && slice >= 55 && slice <= 57)
        for (int w = 0; w < NW; w++) if (55 + w % 3 == int'(slice)) wires[1][3][w] = 1'b1;
      prev_slice = slice;
      @(negedge clk); clocks++;
    end
    wires = '0; ext_pretrig = 0;
    n_wiremode++;
    check(trig_valid && clocks == RUN_SLICES * SLICE_CLKS + 1, "cycle 3 completes on time");
    check(trigger && trig_tpcm && !trig_tpcs, "cycle 3 is a majority trigger");
    if (trig_tpcm) n_tpcm++;

    // ------------------------------------------------ 4: hold
    hold = 1;
    @(negedge clk) bx = 1;
    @(negedge clk) bx = 0;
    repeat (8) @(negedge clk);
    check(!busy, "crossing ignored while held");
    if (!busy) n_hold++;
    hold = 0;

    // ------------------------------------------------ mechanisms
    check(n_tpcf > 0,      "mechanism: prompt TPC pretrigger");
    check(n_ext > 0,       "mechanism: external pretrigger");
    check(n_abort > 0,     "mechanism: abort without pretrigger");
    check(n_clear > 0,     "mechanism: analog clear");
    check(n_tpcs > 0,      "mechanism: ripple trigger");
    check(n_tpcm > 0,      "mechanism: majority trigger");
    check(n_testmode > 0,  "mechanism: test-pattern injection");
    check(n_wiremode > 0,  "mechanism: wire acquisition");
    check(n_readout > 0,   "mechanism: recording readout");
    check(n_m_off > 0,     "mechanism: window subtraction turns M off");
    check(n_sector_or > 0, "mechanism: sector ORing");
    check(n_hold > 0,      "mechanism: hold");
    $display("mechanisms: tpcf=%0d ext=%0d abort=%0d clear=%0d tpcs=%0d tpcm=%0d test=%0d wire=%0d readout=%0d m_off=%0d or=%0d hold=%0d",
             n_tpcf, n_ext, n_abort, n_clear, n_tpcs, n_tpcm, n_testmode, n_wiremode, n_readout, n_m_off, n_sector_or, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
