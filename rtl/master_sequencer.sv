// master_sequencer -- time-slice sequencer of the trigger.
//
// All trigger processing is synchronous to this sequencer, which turns the
// 16 us drift time into 64 time slices of 250 ns so that the trigger can be
// tested pattern by pattern. A beam crossing (`bx`) while idle and not held
// starts a cycle: `init` is high for that one clock (thresholds are loaded,
// state is cleared), then slices k = 0 .. RUN_SLICES-1 follow, each of
// SLICE_CLKS clocks numbered by `phase`; `slice_end` marks the last clock of
// a slice. The cycle runs 64 slices plus the pipeline latency of the
// processing. The windows TF, TS and TM are high while their start <= k <
// stop. At the end of the TF window the cycle is aborted unless a
// pretrigger has been seen (`pretrig_seen`); the sequencer then raises
// `clear` for CLEAR_SLICES slices (the analog clearing time) before it will
// accept another crossing. A complete cycle ends with a one-clock `done`.
// The slice length, window count and clearing time follow the original
// (250 ns, 64 slices, about 500 ns); the clock ratio, programmable window
// registers and abort rule at the TF stop are this design's.
module master_sequencer
  import tpc_trig_pkg::*;
#(
  parameter int RUN          = RUN_SLICES,
  parameter int CLEAR_SLICES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bx,
  input  logic       hold,
  input  logic       pretrig_seen,
  input  windows_t   win,
  output logic       init,
  output logic       run,
  output logic [1:0] phase,
  output logic       slice_end,
  output slice_t     k,
  output logic       tf,
  output logic       ts,
  output logic       tm,
  output logic       clear,
  output logic       done,
  output logic       aborted
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CLEAR} state_e;
  state_e state;

  logic last_run_slice, tf_check;

  assign init           = (state == S_IDLE) && bx && !hold;
  assign run            = (state == S_RUN);
  assign clear          = (state == S_CLEAR);
  assign slice_end      = (state != S_IDLE) && (phase == 2'(SLICE_CLKS - 1));
  assign last_run_slice = (k == slice_t'(RUN - 1));
  assign tf_check       = (win.tf_stop != '0) && (k + 1'b1 == win.tf_stop);
  assign aborted        = run && slice_end && tf_check && !pretrig_seen;
  assign done           = run && slice_end && !aborted && last_run_slice;

  assign tf = run && (k >= win.tf_start) && (k < win.tf_stop);
  assign ts = run && (k >= win.ts_start) && (k < win.ts_stop);
  assign tm = run && (k >= win.tm_start) && (k < win.tm_stop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= '0;
      k     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          phase <= '0;
          k     <= '0;
          if (init) state <= S_RUN;
        end
        S_RUN: begin
          phase <= phase + 1'b1;
          if (slice_end) begin
            if (aborted) begin
              state <= S_CLEAR;
              k     <= '0;
            end else if (done) begin
              state <= S_IDLE;
              k     <= '0;
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        S_CLEAR: begin
          phase <= phase + 1'b1;
          if (slice_end) begin
            if (k == slice_t'(CLEAR_SLICES - 1)) begin
              state <= S_IDLE;
              k     <= '0;
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
