// tb_n_fifo -- random writes on both lanes; the read port must return the
// value written `delta` writes earlier on the same lane (reference: a
// per-lane history array in the testbench).
module tb_n_fifo;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, lane = 0, we = 0;
  count_t din, dout;
  delta_t delta;
  int checks = 0, failures = 0;
  int hist [2][256];
  int hn [2];
  n_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      delta = delta_t'(1 + $urandom_range(0, 14));
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      hn[0] = 0; hn[1] = 0;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        lane = 1'($urandom);
        // check the read port before writing
        if (hn[lane] >= int'(delta)) begin
          #1;
          checks++;
          if (int'(dout) != hist[lane][hn[lane] - int'(delta)]) begin
            failures++;
            $display("FAIL lane=%0d delta=%0d got %0d", lane, delta, dout);
          end
        end
        din = count_t'($urandom_range(0, 8));
        we  = 1'($urandom);
        if (we) begin hist[lane][hn[lane]] = int'(din); hn[lane]++; end
        @(posedge clk); #1 we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
