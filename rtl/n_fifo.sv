// n_fifo -- delay store for the hit counts of two time-multiplexed supersectors.
//
// The majority unit must take back, Delta time slices later, each count it
// subtracted. Each of the two lanes (supersector 2j and 2j+1) is a ring of
// 2**DELTA_W entries with its own write pointer; the read port returns the
// entry written Delta writes earlier on the selected lane, which is the
// first-in first-out behaviour of a FIFO holding Delta entries. The caller
// must not use the output before Delta counts have been written (the
// accumulation period); contents are not cleared. Writes are synchronous,
// the read is combinational. `clear` resets both write pointers.
module n_fifo
  import tpc_trig_pkg::*;
#(
  parameter int W  = CNT_W,
  parameter int DW = DELTA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          lane,   // 0: supersector 2j, 1: supersector 2j+1
  input  logic          we,
  input  logic [W-1:0]  din,
  input  logic [DW-1:0] delta,
  output logic [W-1:0]  dout
);
  logic [W-1:0]  mem [2][2**DW];
  logic [DW-1:0] wp  [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp[0] <= '0;
      wp[1] <= '0;
    end else if (clear) begin
      wp[0] <= '0;
      wp[1] <= '0;
    end else if (we) begin
      wp[lane] <= wp[lane] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && !clear) mem[lane][wp[lane]] <= din;
  end

  assign dout = mem[lane][wp[lane] - delta];
endmodule
