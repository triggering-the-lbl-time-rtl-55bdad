// tpc_trig_pkg -- constants and types shared by the TPC dE/dx wire trigger.
//
// The trigger watches the discriminated sense wires of both endcaps of a
// time projection chamber while ionisation drifts onto them, and decides
// within one drift time whether a track from the beam intersection is present.
// Numbers that come from the original system: 2 endcaps, 6 sectors each, 184
// usable wires per sector in 23 radial groups of 8, 64 time slices of 250 ns
// per drift time, an 8-bit arithmetic unit fed by a 4-bit hit count, three
// majority-trigger sections per supersector and a ripple span of three radii.
// Choices of this design: 4 system clocks per time slice (16 MHz), a 4-bit
// coincidence window Delta, 5-bit one-shot widths, 7-bit slice numbers and the
// window defaults below, which include the 2-3 slice pipeline latency.
package tpc_trig_pkg;

  localparam int N_ENDCAPS   = 2;
  localparam int N_SECTORS   = 6;
  localparam int N_PAIRS     = N_SECTORS / 2;  // sector pairs per endcap
  localparam int NW          = 184;            // ORed wires per supersector
  localparam int GROUP_SIZE  = 8;
  localparam int N_GROUPS    = NW / GROUP_SIZE; // 23 radial groups
  localparam int N_SLICES    = 64;             // time slices per drift time
  localparam int SLICE_CLKS  = 4;              // system clocks per time slice
  localparam int N_IDC       = 12;             // 30-degree IDC sections
  localparam int N_TPCM_SECT = 3;              // TPCM sections per supersector
  localparam int AU_W        = 8;
  localparam int CNT_W       = 4;
  localparam int DELTA_W     = 4;
  localparam int OS_W        = 5;
  localparam int K_W         = 7;              // slice number width
  localparam int RIPPLE_SPAN = 3;

  // Pipeline: hits of drift slice d are in second-rank storage during
  // sequencer slice d+1, the majority bits M during d+2, ripple and TPCM
  // results during d+3. A cycle therefore lasts 64 + 3 slices.
  localparam int LAT_SYNC    = 1;
  localparam int LAT_M       = 2;
  localparam int LAT_TRIG    = 3;
  localparam int RUN_SLICES  = N_SLICES + LAT_TRIG;

  typedef logic [K_W-1:0]     slice_t;
  typedef logic [AU_W-1:0]    au_word_t;
  typedef logic [CNT_W-1:0]   count_t;
  typedef logic [DELTA_W-1:0] delta_t;
  typedef logic [OS_W-1:0]    os_width_t;

  // Timing windows in sequencer slice numbers: active for start <= k < stop.
  typedef struct packed {
    slice_t tf_start, tf_stop;   // prompt (pretrigger) window, about 2 us
    slice_t ts_start, ts_stop;   // ripple trigger window, about 4 us ending at 16 us
    slice_t tm_start, tm_stop;   // majority trigger window, about 4 us ending at 16 us
  } windows_t;

  localparam windows_t WINDOWS_DEFAULT = '{
    tf_start: 7'd2,  tf_stop: 7'd8,
    ts_start: 7'd51, ts_stop: 7'd67,
    tm_start: 7'd50, tm_stop: 7'd67
  };

  // Parameters a computer loads before a run (one set per radius).
  typedef struct packed {
    logic [N_GROUPS-1:0]                 pre_mask;    // pretrigger / ripple-start mask
    logic [N_GROUPS-1:0][AU_W-1:0]       au_thresh;   // T_n
    logic [N_GROUPS-1:0][DELTA_W-1:0]    delta;       // coincidence window, slices
    logic [N_GROUPS-1:0][OS_W-1:0]       os_width;    // ripple one-shot width, slices
    logic [N_TPCM_SECT-1:0][CNT_W-1:0]   tpcm_thresh; // n out of 8 threshold
    logic                                r1_enable;   // let R_1 end a ripple too
    logic                                acq_test;    // 1: test RAM instead of wires
  } config_t;

  // Recording memory levels (one memory per level and endcap).
  typedef enum logic [1:0] {
    LVL_WIRES  = 2'd0,
    LVL_MAJ    = 2'd1,
    LVL_RIPPLE = 2'd2,
    LVL_TPCM   = 2'd3
  } rec_level_e;

endpackage
