// tb_record_ram -- fills a 100-bit-wide recording memory (4 words per slice)
// and reads every 32-bit word back, including a word past the end (zero).
module tb_record_ram;
  import tpc_trig_pkg::*;
  localparam int W = 100;
  logic clk = 0, we = 0;
  logic [5:0] waddr, raddr, rword;
  logic [W-1:0] wdata;
  logic [31:0] rdata;
  logic [127:0] ref_mem [64];
  int checks = 0, failures = 0;
  record_ram #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a);
      wdata = {36'($urandom), 32'($urandom), 32'($urandom)};
      ref_mem[a] = 128'(wdata);
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 64; a++) begin
      for (int w = 0; w < 5; w++) begin
        @(negedge clk) raddr = 6'(a); rword = 6'(w);
        @(negedge clk);
        checks++;
        if (rdata != ((w < 4) ? ref_mem[a][w*32 +: 32] : 32'd0)) begin
          failures++;
          $display("FAIL slice %0d word %0d got %h", a, w, rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
