// tb_hit_encoder -- exhaustive check of the 8-wire hit counter against $countones.
module tb_hit_encoder;
  import tpc_trig_pkg::*;
  logic [GROUP_SIZE-1:0] hits;
  count_t n;
  int checks = 0, failures = 0;
  hit_encoder dut (.hits(hits), .n_hits(n));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      hits = 8'(v);
      #1;
      checks++;
      if (32'(n) != $countones(hits)) begin
        failures++;
        $display("FAIL hits=%b n=%0d", hits, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
