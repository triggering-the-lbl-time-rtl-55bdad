// tpc_trigger_top -- dE/dx wire trigger of the time projection chamber.
//
// Top level: one master sequencer, two endcaps processed in parallel, and
// the final decision. A beam crossing starts a cycle of 64 time slices
// (plus 3 slices of pipeline). During the TF window the prompt pretrigger
// TPCF (or the external drift-chamber pretrigger `ext_pretrig`) must appear,
// otherwise the cycle is aborted and `analog_clear` is raised for two
// slices. A complete cycle ends with `trig_valid`, and `trigger` tells
// whether the ripple trigger (TPCS, during TS) or the majority trigger
// (TPCM, during TM) fired. Parameters (`cfg`, `win`) and test patterns are
// loaded by a control computer between cycles; `cfg.acq_test` selects the
// test patterns instead of the wires. Recording memories of both endcaps
// are read through rd_endcap/rd_level/rd_addr/rd_word, one clock latency.
// Clock: 16 MHz, four clocks per 250 ns time slice.
module tpc_trigger_top
  import tpc_trig_pkg::*;
(
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         bx,
  input  logic                                         hold,
  input  logic                                         ext_pretrig,
  input  logic [N_IDC-1:0]                             idc_a,
  input  config_t                                      cfg,
  input  windows_t                                     win,
  input  logic [N_ENDCAPS-1:0][N_SECTORS-1:0][NW-1:0]  wires,
  input  logic                                         tp_we,
  input  logic                                         tp_endcap,
  input  logic [2:0]                                   tp_sector,
  input  logic [5:0]                                   tp_addr,
  input  logic [NW-1:0]                                tp_data,
  input  logic                                         rd_endcap,
  input  rec_level_e                                   rd_level,
  input  logic [5:0]                                   rd_addr,
  input  logic [5:0]                                   rd_word,
  output logic [31:0]                                  rd_data,
  output logic                                         busy,
  output logic                                         analog_clear,
  output logic                                         aborted,
  output slice_t                                       slice,
  output logic                                         tpcf,
  output logic                                         tpcs,
  output logic                                         tpcm,
  output logic                                         trigger,
  output logic                                         trig_tpcs,
  output logic                                         trig_tpcm,
  output logic                                         trig_valid
);
  logic       init, run, tick, tf, ts, tm, done, pretrig_seen;
  logic [1:0] phase;
  logic [N_ENDCAPS-1:0][N_SECTORS-1:0] tpcf_ij, tpcs_ij, tpcm_ij;
  logic [N_ENDCAPS-1:0][31:0]          ec_rd_data;

  master_sequencer u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .bx           (bx),
    .hold         (hold),
    .pretrig_seen (pretrig_seen),
    .win          (win),
    .init         (init),
    .run          (run),
    .phase        (phase),
    .slice_end    (tick),
    .k            (slice),
    .tf           (tf),
    .ts           (ts),
    .tm           (tm),
    .clear        (analog_clear),
    .done         (done),
    .aborted      (aborted)
  );

  for (genvar i = 0; i < N_ENDCAPS; i++) begin : g_endcap
    endcap_trigger u_ec (
      .clk       (clk),
      .rst_n     (rst_n),
      .init      (init),
      .run       (run),
      .phase     (phase),
      .tick      (tick),
      .k         (slice),
      .tf        (tf),
      .tm        (tm),
      .cfg       (cfg),
      .idc_a     (idc_a),
      .wires     (wires[i]),
      .tp_we     (tp_we && (tp_endcap == 1'(i))),
      .tp_sector (tp_sector),
      .tp_addr   (tp_addr),
      .tp_data   (tp_data),
      .rd_level  (rd_level),
      .rd_addr   (rd_addr),
      .rd_word   (rd_word),
      .rd_data   (ec_rd_data[i]),
      .m         (),
      .tpf       (),
      .tpcf_ij   (tpcf_ij[i]),
      .tpcs_ij   (tpcs_ij[i]),
      .tpcm_ij   (tpcm_ij[i])
    );
  end

  final_decision u_final (
    .clk          (clk),
    .rst_n        (rst_n),
    .init         (init),
    .tick         (tick),
    .done         (done),
    .tf           (tf),
    .ts           (ts),
    .tm           (tm),
    .ext_pretrig  (ext_pretrig),
    .tpcf_ij      (tpcf_ij),
    .tpcs_ij      (tpcs_ij),
    .tpcm_ij      (tpcm_ij),
    .tpcf         (tpcf),
    .tpcs         (tpcs),
    .tpcm         (tpcm),
    .pretrig_seen (pretrig_seen),
    .trigger      (trigger),
    .trig_tpcs    (trig_tpcs),
    .trig_tpcm    (trig_tpcm),
    .trig_valid   (trig_valid)
  );

  assign busy    = run;
  assign rd_data = ec_rd_data[rd_endcap];
endmodule
