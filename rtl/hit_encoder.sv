// hit_encoder -- counts the hit wires of one radial group of eight.
//
// In the original hardware this is a PROM addressed by the eight synchronised
// wire bits whose contents are the number of ones in the address. Here it is
// the same function written as an adder tree. The original encoder drives an
// inverted count into the arithmetic unit; this design keeps the count
// positive and lets the arithmetic unit subtract. Purely combinational.
module hit_encoder
  import tpc_trig_pkg::*;
(
  input  logic [GROUP_SIZE-1:0] hits,
  output count_t                n_hits
);
  always_comb begin
    n_hits = '0;
    for (int i = 0; i < GROUP_SIZE; i++) n_hits = n_hits + count_t'(hits[i]);
  end
endmodule
