// pretrigger -- prompt-track pretrigger term of one supersector.
//
// TPF is the OR over all radial groups of (mask bit AND majority bit): a
// majority unit above the minimum radius chosen by the mask has fired. The
// supersector's pretrigger TPCF_ij requires, in addition, one of the two
// 30-degree Inner Drift Chamber sections A_2j-1 or A_2j that cover it.
// The TF window and the OR over supersectors are applied in final_decision.
// Purely combinational; this structure follows the original logic exactly.
module pretrigger
  import tpc_trig_pkg::*;
#(
  parameter int NG = N_GROUPS
) (
  input  logic [NG-1:0] m,
  input  logic [NG-1:0] mask,
  input  logic          idc_lo,   // A_2j-1
  input  logic          idc_hi,   // A_2j
  output logic          tpf,
  output logic          tpcf
);
  assign tpf  = |(m & mask);
  assign tpcf = tpf & (idc_lo | idc_hi);
endmodule
