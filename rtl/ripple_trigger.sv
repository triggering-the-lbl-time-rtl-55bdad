// ripple_trigger -- ripple trigger of one supersector.
//
// A track drifting onto the endcap reaches the outer radii first and the
// inner radii later. The ripple follows it inwards: radial group n may fire
// its ripple signal R_n only if its majority bit M_n is set and it is enabled,
//   enable_n = (TF and Mask(n)) or R_n+1 or R_n+2 or R_n+3,
// where R above the top group counts as 1 (so the outermost groups can start
// a ripple at any time) and the TF/Mask term lets a track seen during the
// prompt window start a ripple at any radius the mask allows. Spanning three
// radii bridges missing hits at the gaps between sectors. Each R_n is a
// retriggerable one-shot of computer-set width (2-3 us, i.e. 8-12 slices),
// so an enable lasts long enough for the track to drift on to lower radii.
// The supersector's result is TPCS_ij = R_0 or R_1; R_1 takes part only when
// `r1_enable` is set (a switch in the original). All of this follows the
// original logic; the one-shot is updated once per slice (`tick`), so the
// ripple moves down by at most one radial group per time slice.
module ripple_trigger
  import tpc_trig_pkg::*;
#(
  parameter int NG   = N_GROUPS,
  parameter int SPAN = RIPPLE_SPAN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     tick,
  input  logic                     tf,
  input  logic [NG-1:0]            m,
  input  logic [NG-1:0]            mask,
  input  logic [NG-1:0][OS_W-1:0]  width,
  input  logic                     r1_enable,
  output logic [NG-1:0]            r,
  output logic                     tpcs
);
  // R extended with ones above the top group.
  logic [NG+SPAN-1:0] r_ext;
  logic [NG-1:0]      fire;

  assign r_ext = {{SPAN{1'b1}}, r};

  always_comb begin
    for (int n = 0; n < NG; n++)
      fire[n] = ((tf & mask[n]) | (|r_ext[n+1 +: SPAN])) & m[n];
  end

  for (genvar n = 0; n < NG; n++) begin : g_os
    digital_oneshot u_os (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .tick  (tick),
      .trig  (fire[n]),
      .width (width[n]),
      .q     (r[n])
    );
  end

  assign tpcs = r[0] | (r1_enable & r[1]);
endmodule
