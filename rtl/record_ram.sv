// record_ram -- recording ("control") memory of one processing level.
//
// Every board of the original samples the data it passes downstream once
// per time slice into a RAM that the computer reads afterwards, which makes
// the trigger its own logic analyser and lets recorded events be replayed
// as test patterns. This memory stores one W-bit word per drift slice
// (write port, one write per slice by the caller) and returns it to the
// computer as 32-bit words: word `rword` of slice `raddr` appears on
// `rdata` one clock after the address. Bits beyond W read as zero.
module record_ram
  import tpc_trig_pkg::*;
#(
  parameter int W     = NW * N_SECTORS,
  parameter int DEPTH = N_SLICES
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(DEPTH)-1:0]    waddr,
  input  logic [W-1:0]                wdata,
  input  logic [$clog2(DEPTH)-1:0]    raddr,
  input  logic [5:0]                  rword,
  output logic [31:0]                 rdata
);
  localparam int NWORDS = (W + 31) / 32;
  logic [NWORDS*32-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= (NWORDS*32)'(wdata);
  end

  always_ff @(posedge clk) begin
    if (32'(rword) < NWORDS) rdata <= mem[raddr][32'(rword)*32 +: 32];
    else                     rdata <= '0;
  end
endmodule
