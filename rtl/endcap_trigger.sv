// endcap_trigger -- all trigger processing of one TPC endcap.
//
// Data flow, one stage per time slice (d = drift slice of the hits):
//   wires/test RAM -> sector_sync (second rank valid in slice d+1)
//   -> 69 majority_au, one per sector pair and radial group (M in d+2)
//   -> per supersector: pretrigger (combinational on M), ripple_trigger and
//      tpcm_trigger (valid in d+3).
// Supersector s ORs sector s with sector s-1 (mod 6). Majority unit (p, n)
// serves supersectors 2p and 2p+1 for radial group n. The IDC sections
// feeding supersector s are A_2s-1 and A_2s (mod 12).
// Four recording memories sample the data at each level, addressed by
// drift slice: level 0 the 6x184 synchronised wire bits; level 1 the 6x23
// majority bits and, per supersector, TPF (bit 23 of each 24-bit field);
// level 2 per supersector {TPCS_ij, R18,R17,R16, R10,R9,R8, R2,R1,R0}
// (the nine radii the original samples) in 10-bit fields; level 3 per
// supersector {TPCM_ij, above[2:0], count2, count1, count0} in 16-bit
// fields. The computer reads them with rd_level/rd_addr/rd_word; data
// appears one clock later. Radius-dependent parameters (threshold, Delta,
// mask, one-shot width) are shared by all supersectors, a choice of this
// design. Test-pattern bits reach the synchronisers only while run is high,
// also a choice of this design.
module endcap_trigger
  import tpc_trig_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  init,
  input  logic                                  run,
  input  logic [1:0]                            phase,
  input  logic                                  tick,
  input  slice_t                                k,
  input  logic                                  tf,
  input  logic                                  tm,
  input  config_t                               cfg,
  input  logic [N_IDC-1:0]                      idc_a,
  input  logic [N_SECTORS-1:0][NW-1:0]          wires,
  // test pattern load
  input  logic                                  tp_we,
  input  logic [2:0]                            tp_sector,
  input  logic [5:0]                            tp_addr,
  input  logic [NW-1:0]                         tp_data,
  // recording memory readout
  input  rec_level_e                            rd_level,
  input  logic [5:0]                            rd_addr,
  input  logic [5:0]                            rd_word,
  output logic [31:0]                           rd_data,
  // results per supersector
  output logic [N_SECTORS-1:0][N_GROUPS-1:0]    m,
  output logic [N_SECTORS-1:0]                  tpf,
  output logic [N_SECTORS-1:0]                  tpcf_ij,
  output logic [N_SECTORS-1:0]                  tpcs_ij,
  output logic [N_SECTORS-1:0]                  tpcm_ij
);
  logic [N_SECTORS-1:0][NW-1:0]     test_raw, test_bits;
  logic [N_SECTORS-1:0][NW-1:0]     hits;
  logic [N_SECTORS-1:0][N_GROUPS-1:0] r;
  logic [N_SECTORS-1:0][N_TPCM_SECT-1:0][CNT_W-1:0] tpcm_count;
  logic [N_SECTORS-1:0][N_TPCM_SECT-1:0]            tpcm_above;

  // ---------------------------------------------------------------- inputs
  for (genvar s = 0; s < N_SECTORS; s++) begin : g_sector
    test_pattern_ram u_tpram (
      .clk   (clk),
      .we    (tp_we && tp_sector == 3'(s)),
      .waddr (tp_addr),
      .wdata (tp_data),
      .raddr (k),
      .rdata (test_raw[s])
    );
    // Test inputs are driven only during a cycle, so that a hit in slice 0
    // is a rising edge.
    assign test_bits[s] = run ? test_raw[s] : '0;

    sector_sync u_sync (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (init),
      .tick      (tick && run),
      .acq_test  (cfg.acq_test),
      .wire_own  (wires[s]),
      .wire_prev (wires[(s + N_SECTORS - 1) % N_SECTORS]),
      .test_own  (test_bits[s]),
      .test_prev (test_bits[(s + N_SECTORS - 1) % N_SECTORS]),
      .hits      (hits[s])
    );
  end

  // ------------------------------------------------------- majority logic
  for (genvar p = 0; p < N_PAIRS; p++) begin : g_pair
    for (genvar n = 0; n < N_GROUPS; n++) begin : g_group
      majority_au u_au (
        .clk    (clk),
        .rst_n  (rst_n),
        .init   (init),
        .en     (run),
        .phase  (phase),
        .hits_a (hits[2*p][n*GROUP_SIZE +: GROUP_SIZE]),
        .hits_b (hits[2*p+1][n*GROUP_SIZE +: GROUP_SIZE]),
        .thresh (cfg.au_thresh[n]),
        .delta  (cfg.delta[n]),
        .m_a    (m[2*p][n]),
        .m_b    (m[2*p+1][n]),
        .r_a    (),
        .r_b    ()
      );
    end
  end

  // ------------------------------------------ pretrigger, ripple, majority
  for (genvar s = 0; s < N_SECTORS; s++) begin : g_super
    pretrigger u_pre (
      .m      (m[s]),
      .mask   (cfg.pre_mask),
      .idc_lo (idc_a[(2*s + N_IDC - 1) % N_IDC]),
      .idc_hi (idc_a[2*s]),
      .tpf    (tpf[s]),
      .tpcf   (tpcf_ij[s])
    );

    ripple_trigger u_ripple (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (init),
      .tick      (tick && run),
      .tf        (tf),
      .m         (m[s]),
      .mask      (cfg.pre_mask),
      .width     (cfg.os_width),
      .r1_enable (cfg.r1_enable),
      .r         (r[s]),
      .tpcs      (tpcs_ij[s])
    );

    tpcm_trigger u_tpcm (
      .clk    (clk),
      .rst_n  (rst_n),
      .clear  (init),
      .tick   (tick && run),
      .tm     (tm),
      .m      (m[s]),
      .thresh (cfg.tpcm_thresh),
      .count  (tpcm_count[s]),
      .above  (tpcm_above[s]),
      .tpcm   (tpcm_ij[s])
    );
  end

  // ------------------------------------------------- recording memories
  localparam int W_L0 = N_SECTORS * NW;
  localparam int W_L1 = N_SECTORS * (N_GROUPS + 1);
  localparam int W_L2 = N_SECTORS * 10;
  localparam int W_L3 = N_SECTORS * 16;

  logic [N_SECTORS-1:0][N_GROUPS:0] l1_data;
  logic [N_SECTORS-1:0][9:0]        l2_data;
  logic [N_SECTORS-1:0][15:0]       l3_data;
  logic [3:0]                       rec_we;
  logic [3:0][5:0]                  rec_addr;
  logic [3:0][31:0]                 rec_rdata;

  for (genvar s = 0; s < N_SECTORS; s++) begin : g_rec
    assign l1_data[s] = {tpf[s], m[s]};
    assign l2_data[s] = {tpcs_ij[s], r[s][18], r[s][17], r[s][16],
                         r[s][10], r[s][9], r[s][8], r[s][2], r[s][1], r[s][0]};
    assign l3_data[s] = {tpcm_ij[s], tpcm_above[s], tpcm_count[s]};
  end

  // Level L records drift slice k - latency(L) while it lies in 0..63.
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      automatic slice_t lat = slice_t'((l == 0) ? LAT_SYNC : (l == 1) ? LAT_M : LAT_TRIG);
      automatic slice_t d = k - lat;
      rec_we[l]   = run && tick && (k >= lat) && (d < slice_t'(N_SLICES));
      rec_addr[l] = d[5:0];
    end
  end

  record_ram #(.W(W_L0)) u_rec0 (.clk(clk), .we(rec_we[0]), .waddr(rec_addr[0]), .wdata(hits),
                                 .raddr(rd_addr), .rword(rd_word), .rdata(rec_rdata[0]));
  record_ram #(.W(W_L1)) u_rec1 (.clk(clk), .we(rec_we[1]), .waddr(rec_addr[1]), .wdata(l1_data),
                                 .raddr(rd_addr), .rword(rd_word), .rdata(rec_rdata[1]));
  record_ram #(.W(W_L2)) u_rec2 (.clk(clk), .we(rec_we[2]), .waddr(rec_addr[2]), .wdata(l2_data),
                                 .raddr(rd_addr), .rword(rd_word), .rdata(rec_rdata[2]));
  record_ram #(.W(W_L3)) u_rec3 (.clk(clk), .we(rec_we[3]), .waddr(rec_addr[3]), .wdata(l3_data),
                                 .raddr(rd_addr), .rword(rd_word), .rdata(rec_rdata[3]));

  assign rd_data = rec_rdata[rd_level];
endmodule
