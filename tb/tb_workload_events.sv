// tb_workload_events -- realistic events through the full-size trigger,
// checked slice by slice against a reference model of the whole chain.
// Events (test-pattern injection, endcap 0):
//   1. five tracks with synchrotron-like background in sector 0: two shallow
//      tracks that leave through the endcap during the prompt window and
//      three that start at the outer radius later; a pretrigger and a ripple
//      trigger are expected.
//   2. a cosmic ray in sector 1 running from small radius and early time to
//      large radius and late time, with a delta ray; the external pretrigger
//      is used. The ripple must reject the wrong inclination.
//   3. background alone in all six sectors, external pretrigger: no trigger.
// Model: wire levels ORed into supersectors, rising edges only (dead time),
// sliding-window hit sums against T (M), the ripple one-shots, the TPCM
// latch and counts, and the windowed final flags, with the pipeline latency
// of the design (M of drift slice d in sequencer slice d+2). The recorded
// majority, ripple and TPCM levels of all six supersectors and the final
// decision are compared with it.
module tb_workload_events;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, bx = 0, hold = 0, ext_pretrig = 0;
  logic [N_IDC-1:0] idc_a = '1;
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
  always #31.25ns clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = N_SLICES + 4;        // model slices (drift d up to 67)
  logic [NW-1:0] pat [N_SECTORS][N_SLICES];

  // ---------------------------------------------------------------- stimulus
  task automatic clear_pat();
    for (int s = 0; s < N_SECTORS; s++) for (int d = 0; d < N_SLICES; d++) pat[s][d] = '0;
  endtask

  // straight track from (d0, w0) to (d1, w1): one hit per wire
  task automatic add_track(int sec, int d0, int w0, int d1, int w1);
    int lo = (w0 < w1) ? w0 : w1, hi = (w0 < w1) ? w1 : w0;
    for (int w = lo; w <= hi; w++) begin
      int d = d0 + ((w - w0) * (d1 - d0)) / ((w1 == w0) ? 1 : (w1 - w0));
      if (d >= 0 && d < N_SLICES && w >= 0 && w < NW) pat[sec][d][w] = 1'b1;
    end
  endtask

  task automatic add_background(int sec, int n);
    for (int i = 0; i < n; i++) pat[sec][$urandom_range(0, N_SLICES - 1)][$urandom_range(0, NW - 1)] = 1'b1;
  endtask

  task automatic load_all();
    for (int s = 0; s < N_SECTORS; s++)
      for (int d = 0; d < N_SLICES; d++) begin
        @(negedge clk);
        tp_we = 1; tp_endcap = 0; tp_sector = 3'(s); tp_addr = 6'(d); tp_data = pat[s][d];
      end
    @(negedge clk) tp_we = 0;
  endtask

  // ------------------------------------------------------------------- model
  logic [N_GROUPS-1:0] m_mod [N_SECTORS][NS];          // M of drift slice d
  logic [9:0]          l2_mod [N_SECTORS][N_SLICES];
  logic [15:0]         l3_mod [N_SECTORS][N_SLICES];
  logic exp_abort, exp_tpcs, exp_tpcm;

  function automatic logic in_win(int s, slice_t a, slice_t b);
    return s >= int'(a) && s < int'(b);
  endfunction

  task automatic run_model(logic ext);
    logic [NW-1:0] lvl, lvl_prev, hit;
    int nh [NS];
    int sum, cnt [N_GROUPS];
    logic [NW-1:0] hits_d [NS];
    logic [23:0] lat;
    logic [N_GROUPS-1:0] mseq, r;
    logic [N_GROUPS+2:0] rx;
    logic pre, sf, mf, tpcs_now, tpcm_now, tpf_now, fire;
    logic [2:0] above;
    logic [2:0][3:0] cnts;
    logic any_tpcs, any_tpcm, any_tpcf;
    logic [N_SECTORS-1:0][N_GROUPS-1:0] r_all;
    int cnt_all [N_SECTORS][N_GROUPS];
    logic [23:0] lat_all [N_SECTORS];
    // majority bits per supersector
    for (int s = 0; s < N_SECTORS; s++) begin
      lvl_prev = '0;
      for (int d = 0; d < NS; d++) begin
        lvl = (d < N_SLICES) ? (pat[s][d] | pat[(s + N_SECTORS - 1) % N_SECTORS][d]) : '0;
        hits_d[d] = lvl & ~lvl_prev;
        lvl_prev = lvl;
      end
      for (int d = 0; d < NS; d++)
        for (int n = 0; n < N_GROUPS; n++) begin
          sum = 0;
          for (int j = d - int'(cfg.delta[n]) + 1; j <= d; j++)
            if (j >= 0) sum += $countones(hits_d[j][n*8 +: 8]);
          m_mod[s][d][n] = (sum > int'(cfg.au_thresh[n]));
        end
      for (int n = 0; n < N_GROUPS; n++) cnt_all[s][n] = 0;
      lat_all[s] = '0;
    end
    // trigger stage, sequencer slices 0 .. RUN_SLICES-1
    pre = 0; sf = 0; mf = 0; exp_abort = 0;
    for (int sl = 0; sl < RUN_SLICES; sl++) begin
      any_tpcs = 0; any_tpcm = 0; any_tpcf = 0;
      for (int s = 0; s < N_SECTORS; s++) begin
        mseq = (sl >= 2) ? m_mod[s][sl - 2] : '0;
        for (int n = 0; n < N_GROUPS; n++) r[n] = (cnt_all[s][n] > 0);
        tpcs_now = r[0] | (cfg.r1_enable & r[1]);
        for (int q = 0; q < 3; q++) begin
          cnts[q] = 4'($countones(lat_all[s][q*8 +: 8]));
          above[q] = cnts[q] > cfg.tpcm_thresh[q];
        end
        tpcm_now = &above;
        tpf_now  = |(mseq & cfg.pre_mask);
        if (tpf_now && (idc_a[(2*s + 11) % 12] || idc_a[2*s])) any_tpcf = 1;
        if (tpcs_now) any_tpcs = 1;
        if (tpcm_now) any_tpcm = 1;
        if (sl >= 3 && sl - 3 < N_SLICES) begin
          l2_mod[s][sl - 3] = {tpcs_now, r[18], r[17], r[16], r[10], r[9], r[8], r[2], r[1], r[0]};
          l3_mod[s][sl - 3] = {tpcm_now, above, cnts};
        end
        // end-of-slice updates
        rx = {3'b111, r};
        for (int n = 0; n < N_GROUPS; n++) begin
          fire = ((in_win(sl, win.tf_start, win.tf_stop) & cfg.pre_mask[n]) |
                  rx[n+1] | rx[n+2] | rx[n+3]) & mseq[n];
          if (fire) cnt_all[s][n] = int'(cfg.os_width[n]);
          else if (cnt_all[s][n] > 0) cnt_all[s][n]--;
        end
        lat_all[s] = in_win(sl, win.tm_start, win.tm_stop) ? (lat_all[s] | 24'(mseq)) : 24'(mseq);
      end
      if (in_win(sl, win.tf_start, win.tf_stop) && (any_tpcf || ext)) pre = 1;
      if (in_win(sl, win.ts_start, win.ts_stop) && any_tpcs) sf = 1;
      if (in_win(sl, win.tm_start, win.tm_stop) && any_tpcm) mf = 1;
      if (sl == int'(win.tf_stop) - 1 && !pre) begin exp_abort = 1; break; end
    end
    exp_tpcs = sf; exp_tpcm = mf;
  endtask

  // --------------------------------------------------------------- checking
  task automatic read_words(rec_level_e lvl, int d, int nw, output logic [191:0] v);
    v = '0;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk) rd_level = lvl; rd_addr = 6'(d); rd_word = 6'(w); rd_endcap = 0;
      @(negedge clk) v[w*32 +: 32] = rd_data;
    end
  endtask

  int n_events_tpcs = 0, n_events_tpcm = 0, n_events_none = 0, n_pretrig_tpcf = 0, n_lost_bits = 0;

  task automatic run_event(string name, logic ext, output logic got_tpcs, got_tpcm);
    int clocks;
    logic [191:0] v;
    logic was_aborted;
    load_all();
    run_model(ext);
    @(negedge clk) bx = 1;
    @(negedge clk) bx = 0;
    clocks = 0; was_aborted = 0;
    while (!trig_valid && clocks < 2000) begin
      ext_pretrig = ext && (slice == 7'd3);
      if (tpcf) n_pretrig_tpcf++;
      if (aborted) was_aborted = 1;
      @(negedge clk); clocks++;
      if (was_aborted) break;
    end
    ext_pretrig = 0;
    checks++;
    if (was_aborted != exp_abort) begin failures++; $display("FAIL %s: abort %b model %b", name, was_aborted, exp_abort); end
    got_tpcs = trig_tpcs; got_tpcm = trig_tpcm;
    if (!exp_abort) begin
      checks++;
      if (trig_tpcs != exp_tpcs || trig_tpcm != exp_tpcm) begin
        failures++; $display("FAIL %s: tpcs/tpcm %b%b model %b%b", name, trig_tpcs, trig_tpcm, exp_tpcs, exp_tpcm);
      end
      for (int d = 0; d < N_SLICES; d++) begin
        read_words(LVL_MAJ, d, 5, v);
        for (int s = 0; s < N_SECTORS; s++) begin
          checks++;
          if (v[s*24 +: 23] != m_mod[s][d]) begin failures++; $display("FAIL %s: M slice %0d ss %0d", name, d, s); end
        end
        read_words(LVL_RIPPLE, d, 2, v);
        for (int s = 0; s < N_SECTORS; s++) begin
          checks++;
          if (v[s*10 +: 10] != l2_mod[s][d]) begin failures++; $display("FAIL %s: ripple slice %0d ss %0d %b model %b", name, d, s, v[s*10 +: 10], l2_mod[s][d]); end
        end
        read_words(LVL_TPCM, d, 3, v);
        for (int s = 0; s < N_SECTORS; s++) begin
          checks++;
          if (v[s*16 +: 16] != l3_mod[s][d]) begin failures++; $display("FAIL %s: tpcm slice %0d ss %0d", name, d, s); end
        end
      end
    end
    if (got_tpcs) n_events_tpcs++;
    if (got_tpcm) n_events_tpcm++;
    if (!got_tpcs && !got_tpcm) n_events_none++;
    $display("%s: aborted=%b tpcs=%b tpcm=%b", name, was_aborted, got_tpcs, got_tpcm);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    logic t_s, t_m;
    cfg = '0;
    for (int n = 0; n < N_GROUPS; n++) begin
      cfg.au_thresh[n] = 8'd3; cfg.delta[n] = 4'd4; cfg.os_width[n] = 5'd12;
    end
    cfg.pre_mask = 23'h7FF000;             // radial groups 12..22
    cfg.tpcm_thresh = {4'd4, 4'd4, 4'd4};  // more than 4 of 8
    cfg.r1_enable = 1;
    cfg.acq_test = 1;
    win = WINDOWS_DEFAULT;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1: five tracks and background in sector 0
    clear_pat();
    add_track(0,  0, 100, 42, 0);
    add_track(0,  0, 148, 48, 0);
    add_track(0, 19, 180, 54, 0);
    add_track(0, 33, 183, 56, 0);
    add_track(0, 50, 183, 61, 0);
    add_background(0, 40);
    run_event("five tracks", 1'b0, t_s, t_m);
    checks++;
    if (!t_s) begin failures++; $display("FAIL five tracks: no ripple trigger"); end
    checks++;
    if (n_pretrig_tpcf == 0) begin failures++; $display("FAIL five tracks: no prompt pretrigger"); end

    // 2: cosmic ray in sector 1, inward-going in time, with a delta ray
    clear_pat();
    add_track(1, 49, 15, 56, 180);
    add_track(1, 55, 150, 55, 165);
    add_background(1, 5);
    run_event("cosmic ray", 1'b1, t_s, t_m);
    checks++;
    if (t_s) begin failures++; $display("FAIL cosmic ray: wrong inclination rippled"); end

    // 3: background only
    clear_pat();
    for (int s = 0; s < N_SECTORS; s++) add_background(s, 40);
    run_event("background", 1'b1, t_s, t_m);
    checks++;
    if (t_s || t_m) begin failures++; $display("FAIL background triggered"); end

    $display("events: ripple=%0d majority=%0d none=%0d", n_events_tpcs, n_events_tpcm, n_events_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
