// tb_digital_oneshot -- random triggers and widths against a counter model;
// also a directed check that a single trigger gives exactly `width` slices.
module tb_digital_oneshot;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, trig = 0, q;
  os_width_t width;
  int checks = 0, failures = 0;
  digital_oneshot dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int remain, high;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: one trigger, count the slices q is high
    width = 5'd12;
    @(negedge clk) tick = 1; trig = 1;
    @(negedge clk) trig = 0;
    high = 0;
    repeat (20) begin
      if (q) high++;
      @(negedge clk);
    end
    checks++;
    if (high != 12) begin failures++; $display("FAIL width 12 gave %0d slices", high); end
    // random: model counts the remaining slices
    remain = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (q != (remain > 0)) begin failures++; $display("FAIL step %0d q=%0d remain=%0d", i, q, remain); end
      tick  = ($urandom_range(0, 3) != 0);
      trig  = ($urandom_range(0, 9) == 0);
      clear = ($urandom_range(0, 199) == 0);
      if (i % 500 == 0) width = os_width_t'($urandom_range(0, 31));
      if (clear) remain = 0;
      else if (tick) begin
        if (trig) remain = int'(width);
        else if (remain > 0) remain--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
