// tpcm_trigger -- majority-of-majorities trigger of one supersector.
//
// Tracks at about 90 degrees to the beam drift onto all radii at once and
// cannot ripple. This trigger splits the supersector's radial groups into
// three sections of eight (units 0-7, 8-15, 16-23; unit 23 does not exist
// with 23 groups and reads as 0). Once per slice each section's majority
// bits are latched: outside the TM window the latch follows M, inside TM
// it keeps every unit that has turned on. An encoder counts the latched
// units (4 bits) and a comparator tests count > threshold; TPCM_ij is the
// AND of the three comparisons. The TM gate on the final OR is applied in
// final_decision. Latch, encoder, ">" comparator and AND follow the
// original; the latch being transparent outside TM is this design's reading.
// Outputs are valid one slice after the M bits they reflect.
module tpcm_trigger
  import tpc_trig_pkg::*;
#(
  parameter int NG = N_GROUPS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              tick,
  input  logic                              tm,
  input  logic [NG-1:0]                     m,
  input  logic [N_TPCM_SECT-1:0][CNT_W-1:0] thresh,
  output logic [N_TPCM_SECT-1:0][CNT_W-1:0] count,
  output logic [N_TPCM_SECT-1:0]            above,
  output logic                              tpcm
);
  localparam int NU = N_TPCM_SECT * GROUP_SIZE;
  logic [NU-1:0] m_pad, latched;

  assign m_pad = NU'(m);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     latched <= '0;
    else if (clear) latched <= '0;
    else if (tick)  latched <= tm ? (latched | m_pad) : m_pad;
  end

  for (genvar s = 0; s < N_TPCM_SECT; s++) begin : g_sect
    hit_encoder u_enc (
      .hits   (latched[s*GROUP_SIZE +: GROUP_SIZE]),
      .n_hits (count[s])
    );
    assign above[s] = count[s] > thresh[s];
  end

  assign tpcm = &above;
endmodule
