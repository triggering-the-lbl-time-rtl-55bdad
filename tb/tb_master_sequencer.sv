// tb_master_sequencer -- cycle timing of the sequencer.
// A full cycle must last RUN_SLICES slices of 4 clocks from `init` to
// `done`, with phase and slice number counting and TF/TS/TM high exactly
// in their programmed slices. Without a pretrigger the cycle must abort at
// the last TF slice and clear for 2 slices (about 500 ns) before the next
// crossing is accepted. `hold` and crossings during a cycle start nothing.
module tb_master_sequencer;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, bx = 0, hold = 0, pretrig_seen = 0;
  windows_t win;
  logic init, run, slice_end, tf, ts, tm, clear, done, aborted;
  logic [1:0] phase;
  slice_t k;
  int checks = 0, failures = 0;
  master_sequencer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at k=%0d phase=%0d", what, k, phase); end
  endtask
  initial begin
    int clocks, n_inits;
    win = WINDOWS_DEFAULT;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // hold blocks a start
    @(negedge clk) hold = 1; bx = 1;
    #1 check(!init, "init while held");
    @(negedge clk) hold = 0; bx = 0;
    // full cycle
    pretrig_seen = 1;
    @(negedge clk) bx = 1;
    #1 check(init, "init on bx");
    @(negedge clk) bx = 0;
    clocks = 0; n_inits = 0;
    while (!done) begin
      check(run, "run during cycle");
      check(int'(phase) == clocks % 4 && int'(k) == clocks / 4, "phase/slice count");
      check(slice_end == (phase == 2'd3), "slice_end");
      check(tf == (k >= win.tf_start && k < win.tf_stop), "TF window");
      check(ts == (k >= win.ts_start && k < win.ts_stop), "TS window");
      check(tm == (k >= win.tm_start && k < win.tm_stop), "TM window");
      bx = ($urandom_range(0, 9) == 0);   // crossings during a cycle are ignored
      #1 if (init) n_inits++;
      @(negedge clk);
      clocks++;
      if (clocks > 1000) break;
    end
    check(clocks == RUN_SLICES * SLICE_CLKS - 1, "cycle length");
    check(n_inits == 0, "restart during cycle");
    @(negedge clk) bx = 0;
    check(!run, "idle after done");
    // abort without pretrigger
    pretrig_seen = 0;
    @(negedge clk) bx = 1;
    @(negedge clk) bx = 0;
    clocks = 0;
    while (!aborted && clocks < 1000) begin @(negedge clk); clocks++; end
    check(int'(k) == int'(win.tf_stop) - 1 && phase == 2'd3, "abort at end of TF");
    @(negedge clk);
    clocks = 0;
    while (clear) begin
      bx = 1;
      #1 check(!init, "start during clear");
      @(negedge clk); clocks++;
    end
    check(clocks == 2 * SLICE_CLKS, "clear lasts 2 slices");
    #1 check(init, "start after clear");
    @(negedge clk) bx = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
