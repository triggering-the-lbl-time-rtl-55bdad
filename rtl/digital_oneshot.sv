// digital_oneshot -- retriggerable one-shot counted in time slices.
//
// Each time slice (`tick`, one clock per slice) in which `trig` is high the
// counter is loaded with `width`; otherwise it counts down to zero. The
// output is high while the counter is non-zero, so a trigger in slice s
// gives an output from slice s+1 through slice s+width, and a new trigger
// restarts the full width. Width 0 disables the output. The original uses
// such one-shots, with radius-dependent computer-set widths, to hold a
// ripple enable for 2-3 us; the counter form is this design's.
module digital_oneshot
  import tpc_trig_pkg::*;
#(
  parameter int W = OS_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         tick,
  input  logic         trig,
  input  logic [W-1:0] width,
  output logic         q
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cnt <= '0;
    else if (clear)            cnt <= '0;
    else if (tick) begin
      if (trig)                cnt <= width;
      else if (cnt != '0)      cnt <= cnt - 1'b1;
    end
  end

  assign q = (cnt != '0);
endmodule
