// tb_test_pattern_ram -- writes random patterns to all 64 slices, reads them
// back by slice number, and checks that slice numbers past 63 read as zero.
module tb_test_pattern_ram;
  import tpc_trig_pkg::*;
  logic clk = 0, we = 0;
  logic [5:0] waddr;
  logic [NW-1:0] wdata, rdata;
  slice_t raddr = 0;
  logic [NW-1:0] ref_mem [64];
  int checks = 0, failures = 0;
  test_pattern_ram dut (.*);
  always #5 clk = ~clk;
  function automatic logic [NW-1:0] rnd();
    logic [NW-1:0] v;
    for (int i = 0; i < NW; i += 32) v[i +: 32] = 32'($urandom);
    return v;
  endfunction
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = rnd(); ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 80; a++) begin
      raddr = slice_t'(a);
      #1;
      checks++;
      if (rdata != ((a < 64) ? ref_mem[a] : '0)) begin
        failures++;
        $display("FAIL slice %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
