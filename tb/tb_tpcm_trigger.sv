// tb_tpcm_trigger -- random majority bits in and out of the TM window. The
// model keeps the latched units (follow M outside TM, accumulate inside),
// counts them per section of eight and compares with the thresholds.
module tb_tpcm_trigger;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, tm = 0;
  logic [N_GROUPS-1:0] m = 0;
  logic [N_TPCM_SECT-1:0][CNT_W-1:0] thresh, count;
  logic [N_TPCM_SECT-1:0] above;
  logic tpcm;
  int checks = 0, failures = 0;
  tpcm_trigger dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [23:0] lat;
    int c, n_fire;
    logic all;
    n_fire = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    lat = '0;
    for (int ev = 0; ev < 40; ev++) begin
      for (int s = 0; s < 3; s++) thresh[s] = CNT_W'($urandom_range(2, 5));
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      lat = '0;
      for (int k = 0; k < 30; k++) begin
        tm = (k >= 18);
        m = N_GROUPS'($urandom) & N_GROUPS'($urandom);
        tick = 1;
        @(negedge clk) tick = 0;
        lat = tm ? (lat | 24'(m)) : 24'(m);
        all = 1;
        for (int s = 0; s < 3; s++) begin
          c = $countones(lat[s*8 +: 8]);
          checks++;
          if (int'(count[s]) != c || above[s] != (c > int'(thresh[s]))) begin
            failures++;
            $display("FAIL ev %0d k %0d sect %0d count %0d exp %0d", ev, k, s, count[s], c);
          end
          if (!(c > int'(thresh[s]))) all = 0;
        end
        checks++;
        if (tpcm != all) begin failures++; $display("FAIL tpcm ev %0d k %0d", ev, k); end
        if (tpcm) n_fire++;
      end
    end
    checks++;
    if (n_fire == 0) begin failures++; $display("FAIL tpcm never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
