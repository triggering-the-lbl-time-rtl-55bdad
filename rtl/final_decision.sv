// final_decision -- combines both endcaps into pretrigger and trigger.
//
// TPCF, TPCS and TPCM are the ORs over the 12 supersectors (2 endcaps x 6)
// of their pretrigger, ripple and majority results, each gated by its
// timing window: TF for the prompt pretrigger, TS for the ripple trigger,
// TM for the majority trigger. Those are the original's equations. For the
// sequencer this block also remembers, per cycle, whether a pretrigger
// (TPCF or the external drift-chamber pretrigger during TF) has been seen,
// and which trigger types fired. At `done` it presents the decision:
// `trigger` (TPCS or TPCM seen during the cycle) and the two type flags,
// valid with the one-clock `trig_valid` and held until the next `init`.
// The flags are sampled once per slice at `tick`.
module final_decision
  import tpc_trig_pkg::*;
(
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    init,
  input  logic                                    tick,
  input  logic                                    done,
  input  logic                                    tf,
  input  logic                                    ts,
  input  logic                                    tm,
  input  logic                                    ext_pretrig,
  input  logic [N_ENDCAPS-1:0][N_SECTORS-1:0]     tpcf_ij,
  input  logic [N_ENDCAPS-1:0][N_SECTORS-1:0]     tpcs_ij,
  input  logic [N_ENDCAPS-1:0][N_SECTORS-1:0]     tpcm_ij,
  output logic                                    tpcf,
  output logic                                    tpcs,
  output logic                                    tpcm,
  output logic                                    pretrig_seen,
  output logic                                    trigger,
  output logic                                    trig_tpcs,
  output logic                                    trig_tpcm,
  output logic                                    trig_valid
);
  logic pre_f, s_f, m_f;

  assign tpcf = tf & (|tpcf_ij);
  assign tpcs = ts & (|tpcs_ij);
  assign tpcm = tm & (|tpcm_ij);
  assign pretrig_seen = pre_f | tpcf | (tf & ext_pretrig);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_f <= 1'b0; s_f <= 1'b0; m_f <= 1'b0;
      trigger <= 1'b0; trig_tpcs <= 1'b0; trig_tpcm <= 1'b0; trig_valid <= 1'b0;
    end else begin
      trig_valid <= 1'b0;
      if (init) begin
        pre_f <= 1'b0; s_f <= 1'b0; m_f <= 1'b0;
        trigger <= 1'b0; trig_tpcs <= 1'b0; trig_tpcm <= 1'b0;
      end else if (tick) begin
        pre_f <= pretrig_seen;
        s_f   <= s_f | tpcs;
        m_f   <= m_f | tpcm;
        if (done) begin
          trig_tpcs  <= s_f | tpcs;
          trig_tpcm  <= m_f | tpcm;
          trigger    <= s_f | tpcs | m_f | tpcm;
          trig_valid <= 1'b1;
        end
      end
    end
  end
endmodule
