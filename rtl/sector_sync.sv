// sector_sync -- wire input, sector ORing and synchronisation of one supersector.
//
// Supersector s is the OR of sector s and its neighbour s-1, so that a track
// curving across a sector boundary stays inside one supersector. For every
// wire the input is first chosen between the discriminator signal and the
// test-pattern bit (acq_test = 1 selects the test pattern), then ORed with
// the same wire of the neighbouring sector, then synchronised: the original
// uses a flip-flop set by the signal's edge and reset when its content is
// moved into second-rank storage. Here the signal passes two synchroniser
// flip-flops, its rising edge sets a flag, and on the last clock of each
// time slice (`tick`) the flag (plus an edge in that very clock) moves into
// the second-rank register `hits` and the flag is cleared. `hits` therefore
// holds, during slice s+1, which wires started a pulse during slice s. A
// signal that stays high across slices counts once, which is the dead time
// of the original. Edge latency is 2-3 clocks, so a pulse must start at
// least three clocks before the end of a slice to count in that slice.
module sector_sync
  import tpc_trig_pkg::*;
#(
  parameter int N = NW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         tick,
  input  logic         acq_test,
  input  logic [N-1:0] wire_own,
  input  logic [N-1:0] wire_prev,
  input  logic [N-1:0] test_own,
  input  logic [N-1:0] test_prev,
  output logic [N-1:0] hits
);
  logic [N-1:0] ored, meta, sync, sync_d, flag, edge_now;

  assign ored     = acq_test ? (test_own | test_prev) : (wire_own | wire_prev);
  assign edge_now = sync & ~sync_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta   <= '0;
      sync   <= '0;
      sync_d <= '0;
      flag   <= '0;
      hits   <= '0;
    end else begin
      meta   <= ored;
      sync   <= meta;
      sync_d <= sync;
      if (clear) begin
        flag <= '0;
        hits <= '0;
      end else if (tick) begin
        hits <= flag | edge_now;
        flag <= '0;
      end else begin
        flag <= flag | edge_now;
      end
    end
  end
endmodule
