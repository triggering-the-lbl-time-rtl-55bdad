// test_pattern_ram -- test pattern memory of one sector.
//
// Holds one bit per wire and time slice (64 words of NW bits), loaded by the
// control computer through the write port. During a cycle the sequencer's
// slice number addresses it and the word drives the test inputs of the
// sector's wires for that whole slice; slice numbers beyond the last word
// read as zero. The read is combinational so the bit is present from the
// first clock of the slice. The same port lets the computer read back what
// it wrote. Storing simulated tracks this way and injecting them in place of
// the discriminators follows the original; the port layout is this design's.
module test_pattern_ram
  import tpc_trig_pkg::*;
#(
  parameter int N     = NW,
  parameter int DEPTH = N_SLICES
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [N-1:0]             wdata,
  input  slice_t                   raddr,
  output logic [N-1:0]             rdata
);
  logic [N-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = (raddr < slice_t'(DEPTH)) ? mem[raddr[$clog2(DEPTH)-1:0]] : '0;
endmodule
