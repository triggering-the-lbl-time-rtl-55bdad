// tb_sector_sync -- short random pulses on the wires of two sectors and on
// the test inputs, in both input modes. A pulse starting in the first clock
// of slice s on the selected source of either sector must show in `hits`
// during slice s+1 and nowhere else. A level held for two slices counts only
// once (the synchroniser's dead time).
module tb_sector_sync;
  import tpc_trig_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, acq_test = 0;
  logic [N-1:0] wire_own = 0, wire_prev = 0, test_own = 0, test_prev = 0, hits;
  int checks = 0, failures = 0;
  sector_sync #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // One slice = 4 clocks; tick on the last one.
  task automatic slice(input logic [N-1:0] wo, wp, to, tp, output logic [N-1:0] seen);
    @(negedge clk);
    wire_own = wo; wire_prev = wp; test_own = to; test_prev = tp; tick = 0;
    seen = hits;
    @(negedge clk);
    wire_own = 0; wire_prev = 0; test_own = 0; test_prev = 0;
    @(negedge clk);
    @(negedge clk) tick = 1;
  endtask
  initial begin
    logic [N-1:0] expected, seen, wo, wp, to, tp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expected = '0;
    for (int i = 0; i < 400; i++) begin
      acq_test = (i >= 200);
      wo = N'($urandom) & N'($urandom); wp = N'($urandom) & N'($urandom);
      to = N'($urandom) & N'($urandom); tp = N'($urandom) & N'($urandom);
      slice(wo, wp, to, tp, seen);
      if (i != 0 && i != 200) begin
        checks++;
        if (seen != expected) begin
          failures++;
          $display("FAIL slice %0d hits=%h exp %h", i, seen, expected);
        end
      end
      expected = acq_test ? (to | tp) : (wo | wp);
    end
    // dead time: wire 0 held high for two slices
    acq_test = 0;
    @(negedge clk) tick = 0; wire_own = 1;
    repeat (3) @(negedge clk);
    tick = 1;
    @(negedge clk) tick = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (hits[0] !== 1'b1) begin failures++; $display("FAIL held level not seen"); end
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0; wire_own = 0;
    checks++;
    if (hits[0] !== 1'b0) begin failures++; $display("FAIL held level counted twice"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
