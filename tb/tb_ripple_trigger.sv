// tb_ripple_trigger -- directed tracks and random stimulus.
// Directed: a track whose majority bits step down one radial group per slice
// from the top must ripple to R_0 (TPCS); a gap of two missing groups is
// bridged, a gap of three is not; a track starting below the top needs the
// TF window and its mask bit. Random: M, TF and masks against a model of
// R_n = oneshot((TF&Mask_n | R_n+1 | R_n+2 | R_n+3) & M_n), R above top = 1.
module tb_ripple_trigger;
  import tpc_trig_pkg::*;
  localparam int NG = N_GROUPS;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, tf = 0, r1_enable = 0;
  logic [NG-1:0] m = 0, mask = 0, r;
  logic [NG-1:0][OS_W-1:0] width;
  logic tpcs;
  int checks = 0, failures = 0;
  ripple_trigger dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [NG];
  task automatic step(input logic [NG-1:0] mm, input logic tff);
    logic [NG+2:0] rx;
    logic [NG-1:0] fire;
    m = mm; tf = tff; tick = 1;
    rx = {3'b111, r};
    for (int n = 0; n < NG; n++) fire[n] = ((tff & mask[n]) | rx[n+1] | rx[n+2] | rx[n+3]) & mm[n];
    @(negedge clk) tick = 0;
    for (int n = 0; n < NG; n++) begin
      if (fire[n]) cnt[n] = int'(width[n]);
      else if (cnt[n] > 0) cnt[n]--;
    end
    for (int n = 0; n < NG; n++) begin
      checks++;
      if (r[n] != (cnt[n] > 0)) begin failures++; $display("FAIL R%0d=%b model %0d", n, r[n], cnt[n]); end
    end
    checks++;
    if (tpcs != ((cnt[0] > 0) || (r1_enable && cnt[1] > 0))) begin failures++; $display("FAIL tpcs"); end
  endtask

  task automatic restart();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int n = 0; n < NG; n++) cnt[n] = 0;
  endtask

  // track stepping down one group per slice from group `top`, skipping `gap` groups at 12
  task automatic track(int top, int gap, logic tff, output logic reached);
    restart();
    reached = 0;
    for (int n = top; n >= 0; n--) begin
      logic [NG-1:0] mm = '0;
      if (!(n < 12 && n >= 12 - gap)) mm[n] = 1'b1;
      step(mm, tff);
      if (tpcs) reached = 1;
    end
    repeat (3) begin step('0, 1'b0); if (tpcs) reached = 1; end
  endtask

  initial begin
    logic reached;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NG; n++) width[n] = 5'd12;
    mask = '0;
    track(NG - 1, 0, 1'b0, reached);
    checks++; if (!reached) begin failures++; $display("FAIL full track did not ripple"); end
    track(NG - 1, 2, 1'b0, reached);
    checks++; if (!reached) begin failures++; $display("FAIL gap of 2 not bridged"); end
    track(NG - 1, 3, 1'b0, reached);
    checks++; if (reached) begin failures++; $display("FAIL gap of 3 bridged"); end
    track(15, 0, 1'b1, reached);
    checks++; if (reached) begin failures++; $display("FAIL started without mask"); end
    mask = 23'h7FF000;  // groups 12..22 enabled
    track(15, 0, 1'b1, reached);
    checks++; if (!reached) begin failures++; $display("FAIL masked start during TF"); end
    track(15, 0, 1'b0, reached);
    checks++; if (reached) begin failures++; $display("FAIL started outside TF"); end
    // random
    for (int ev = 0; ev < 30; ev++) begin
      restart();
      r1_enable = 1'($urandom);
      mask = NG'($urandom);
      for (int n = 0; n < NG; n++) width[n] = OS_W'($urandom_range(0, 15));
      for (int k = 0; k < 60; k++)
        step(NG'($urandom) & NG'($urandom), (k < 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
