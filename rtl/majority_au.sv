// majority_au -- majority logic unit of one radial group, shared by two supersectors.
//
// A radial group is eight adjacent wires. Its majority signal M is true when
// more than T_n of its wires were hit within the last Delta time slices.
// Rather than keep a running sum and compare it, the unit keeps
// R = T_n - (hits in the window): the register is loaded with the threshold
// at the start of a cycle, each slice the count N_k is subtracted and the
// count N_{k-Delta} that leaves the window is added back (not during the
// first Delta slices, the accumulation period). R below zero, i.e. the sign
// bit of the 8-bit register, is M.
//
// One encoder, one FIFO and one adder serve supersectors 2j (lane a) and
// 2j+1 (lane b) in turn, with a register per supersector. A time slice has
// four system-clock phases:
//   phase 0: R_a += N_a(k-Delta)        phase 2: R_b += N_b(k-Delta)
//   phase 1: R_a -= N_a(k), store N_a   phase 3: R_b -= N_b(k), store N_b
// At the end of phase 3 both M outputs are updated, so they hold steady for
// the whole next slice. This order, the threshold preload and the sign-bit
// comparison follow the original design; the phase numbering and the output
// register are this design's. Thresholds are taken as 0..127 so that the
// register never wraps (it falls by at most 8*Delta = 120).
//
// Interface: `init` (one clock) loads the thresholds and restarts the slice
// count; `en` is high for the slices to be processed; `phase` comes from the
// sequencer; hits_a/hits_b are the second-rank wire bits of the group.
module majority_au
  import tpc_trig_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic                  en,
  input  logic [1:0]            phase,
  input  logic [GROUP_SIZE-1:0] hits_a,
  input  logic [GROUP_SIZE-1:0] hits_b,
  input  au_word_t              thresh,
  input  delta_t                delta,
  output logic                  m_a,
  output logic                  m_b,
  output au_word_t              r_a,
  output au_word_t              r_b
);
  logic   lane;
  count_t n_now, n_old;
  logic   in_window;       // k >= Delta: the FIFO output is valid
  slice_t k;
  au_word_t acc_in, operand, au_out;

  assign lane = phase[1];

  hit_encoder u_enc (
    .hits   (lane ? hits_b : hits_a),
    .n_hits (n_now)
  );

  n_fifo u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (init),
    .lane  (lane),
    .we    (en && phase[0]),
    .din   (n_now),
    .delta (delta),
    .dout  (n_old)
  );

  assign in_window = (k >= slice_t'(delta));
  assign acc_in    = lane ? r_b : r_a;
  // Even phases add the count leaving the window, odd phases subtract the new count.
  assign operand   = phase[0] ? -au_word_t'(n_now)
                              : (in_window ? au_word_t'(n_old) : '0);
  assign au_out    = acc_in + operand;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_a <= '0;
      r_b <= '0;
      k   <= '0;
      m_a <= 1'b0;
      m_b <= 1'b0;
    end else if (init) begin
      r_a <= thresh;
      r_b <= thresh;
      k   <= '0;
      m_a <= 1'b0;
      m_b <= 1'b0;
    end else if (en) begin
      if (lane) r_b <= au_out;
      else      r_a <= au_out;
      if (phase == 2'd3) begin
        m_a <= r_a[AU_W-1];
        m_b <= au_out[AU_W-1];
        if (k != '1) k <= k + 1'b1;
      end
    end
  end
endmodule
