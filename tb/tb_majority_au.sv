// tb_majority_au -- majority unit against the worked example of the
// original (threshold 4, window 3 slices: registers 4 4 3 1 -2 -3 -2 1 3 4 4,
// M set in slices 4-6) on supersector a, while supersector b runs random
// hits checked against a sliding-window sum model. Also checks that M
// changes exactly at the end of phase 3 of its slice (one slice of latency).
module tb_majority_au;
  import tpc_trig_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [1:0] phase = 0;
  logic [GROUP_SIZE-1:0] hits_a = 0, hits_b = 0;
  au_word_t thresh;
  delta_t delta;
  logic m_a, m_b;
  au_word_t r_a, r_b;
  int checks = 0, failures = 0;
  majority_au dut (.*);
  always #5 clk = ~clk;

  function automatic logic [GROUP_SIZE-1:0] ones(int n);
    return GROUP_SIZE'((1 << n) - 1);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_slice(int na, int nb);
    hits_a = ones(na);
    hits_b = ones(nb);
    for (int p = 0; p < 4; p++) begin
      phase = 2'(p);
      @(posedge clk); #1;
    end
  endtask

  int na_seq[11] = '{0, 0, 1, 2, 3, 2, 1, 0, 0, 0, 0};
  int ra_exp[11] = '{4, 4, 3, 1, -2, -3, -2, 1, 3, 4, 4};
  int ma_exp[11] = '{0, 0, 0, 0, 1, 1, 1, 0, 0, 0, 0};

  initial begin
    int nb_hist[$];
    int tb_val, sum, nb, na;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- worked example on lane a, random on lane b with the same T, Delta
    for (int run = 0; run < 6; run++) begin
      if (run == 0) begin thresh = 8'd4; delta = 4'd3; end
      else begin
        thresh = au_word_t'($urandom_range(0, 40));
        delta  = delta_t'($urandom_range(1, 15));
      end
      @(negedge clk) init = 1;
      @(negedge clk) init = 0; en = 1; phase = 0;
      #1;
      nb_hist.delete();
      for (int k = 0; k < 64; k++) begin
        na = (run == 0 && k < 11) ? na_seq[k] : $urandom_range(0, 8);
        nb = $urandom_range(0, 8);
        nb_hist.push_back(nb);
        // M must still show the previous slice's value during phases 0-2
        do_slice(na, nb);
        sum = 0;
        for (int j = k - int'(delta) + 1; j <= k; j++) if (j >= 0) sum += nb_hist[j];
        tb_val = int'(thresh) - sum;
        checks++;
        if (int'($signed(r_b)) != tb_val || m_b != (tb_val < 0)) begin
          failures++;
          $display("FAIL run %0d lane b k=%0d r=%0d exp %0d m=%0d", run, k, $signed(r_b), tb_val, m_b);
        end
        if (run == 0 && k < 11) begin
          checks++;
          if (int'($signed(r_a)) != ra_exp[k] || m_a != ma_exp[k][0]) begin
            failures++;
            $display("FAIL example k=%0d r=%0d exp %0d m=%0d", k, $signed(r_a), ra_exp[k], m_a);
          end
        end
      end
      en = 0;
    end
    // ---- latency: M must not change before phase 3 completes
    thresh = 8'd0; delta = 4'd2;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0; en = 1;
    hits_a = 8'h01; hits_b = 8'h00;
    for (int p = 0; p < 3; p++) begin
      phase = 2'(p);
      @(posedge clk); #1;
      checks++;
      if (m_a !== 1'b0) begin failures++; $display("FAIL M early at phase %0d", p); end
    end
    phase = 2'd3;
    @(posedge clk); #1;
    checks++;
    if (m_a !== 1'b1 || m_b !== 1'b0) begin failures++; $display("FAIL M after phase 3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
