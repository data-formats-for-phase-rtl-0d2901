// cp_cluster: the EM and tau/hadron cluster algorithm of one CPM (the work of
// its eight CP chips). Input: 8-bit EM and hadronic trigger towers over a 7x19
// (eta x phi) array, the CPM's 4x16 core at eta 1..4, phi 1..16 plus the
// environment. A 2x2 core window slides over the core in steps of one tower.
// For each window:
//   - cluster Et = largest sum of two EM towers adjacent in eta or phi;
//   - EM isolation = EM sum of the 12-tower ring of the surrounding 4x4;
//   - hadronic isolation = the same ring in the hadronic layer;
//   - hadronic core = the four hadronic towers behind the EM core.
// Sixteen definitions give a cluster threshold and two maximum isolation sums.
// An EM definition passes when cluster Et > clus, EM ring <= em_iso and
// hadronic core <= had_iso. Definitions 8..15 can be switched to tau/hadron:
// Et = cluster Et + hadronic core, EM ring <= em_iso, hadronic ring <= had_iso.
// The core is split into sixteen 2x2 subregions, subregion s = 2*(phi/2) +
// eta/2 (so chip k = phi/2 owns kL and kR), each holding at most one RoI: the
// window whose EM+hadronic 2x2 sum is a local maximum among its eight
// neighbours ('>' against later, '>=' against earlier neighbours in
// (eta, phi) order). Outputs per subregion: 16 threshold bits and the 2-bit
// fine position {phi&1, eta&1}.
// For the 160 Mbit/s format the block also forms one EM and one hadronic
// cluster record per subregion: present when the Et exceeds cfg.roi_min with
// no isolation cut, Et saturated to 8 bits, and ei / hi / hv = number of the
// three graded levels in cfg that the EM ring / hadronic ring / hadronic core
// stays within (hv is 0 for hadronic clusters).
// From the specification: core size, 2x2 windows, adjacent-pair sum, ring and
// core isolation, 16 definitions with 8 selectable as tau, one RoI per 2x2
// subregion, the record fields. This design's own: the local-maximum quantity
// and tie rule, the tau sum, ring isolation as a sum, the meaning of the
// 2-bit isolation codes and the RoI Et cut.
// Timing: combinational, outputs registered when en is high (one per crossing).
module cp_cluster
  import l1calo_pkg::*;
#(
  parameter int ETA = 7,
  parameter int PHI = 19
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                en,
  input  logic [ETA-1:0][PHI-1:0][TT_W-1:0]   em,
  input  logic [ETA-1:0][PHI-1:0][TT_W-1:0]   had,
  input  cp_def_t [CP_N_DEF-1:0]              defs,
  input  cp_roi_cfg_t                         cfg,
  output logic [CP_N_SUB-1:0][CP_N_DEF-1:0]   hits,
  output logic [CP_N_SUB-1:0][1:0]            fp,
  output cp_roi_t [CP_N_SUB-1:0]              em_roi,
  output cp_roi_t [CP_N_SUB-1:0]              had_roi
);
  localparam int CORE_ETA = ETA - 3;  // 4
  localparam int CORE_PHI = PHI - 3;  // 16
  localparam int SW = TT_W + 4;        // width of 16-tower sums

  typedef logic [SW-1:0] sum_t;

  function automatic logic [1:0] levels(input sum_t v, input logic [2:0][SW-1:0] lv);
    logic [1:0] n = '0;
    for (int k = 0; k < 3; k++)
      if (v <= lv[k]) n++;
    return n;
  endfunction

  function automatic logic [TT_W-1:0] sat8(input sum_t v);
    return (v > sum_t'((1 << TT_W) - 1)) ? '1 : v[TT_W-1:0];
  endfunction

  // 2x2 EM and hadronic sums for every window of the array
  sum_t em2 [ETA-1][PHI-1];
  sum_t had2[ETA-1][PHI-1];

  for (genvar a = 0; a < ETA - 1; a++) begin : g_w2a
    for (genvar b = 0; b < PHI - 1; b++) begin : g_w2b
      assign em2[a][b]  = SW'(em[a][b])  + SW'(em[a+1][b])  + SW'(em[a][b+1])  + SW'(em[a+1][b+1]);
      assign had2[a][b] = SW'(had[a][b]) + SW'(had[a+1][b]) + SW'(had[a][b+1]) + SW'(had[a+1][b+1]);
    end
  end

  // Per core position: threshold bits and the two cluster records.
  logic [CP_N_DEF-1:0] c_hit [CORE_ETA][CORE_PHI];
  logic                c_max [CORE_ETA][CORE_PHI];
  cp_roi_t             c_em  [CORE_ETA][CORE_PHI];
  cp_roi_t             c_had [CORE_ETA][CORE_PHI];

  for (genvar i = 0; i < CORE_ETA; i++) begin : g_ci
    for (genvar j = 0; j < CORE_PHI; j++) begin : g_cj
      localparam int GI = i + 1;
      localparam int GJ = j + 1;
      sum_t rank [3][3];   // EM+had 2x2 sums of the window and its neighbours
      sum_t p0, p1, p2, p3, clus, had_core, tau_et, em4, had4, em_ring, had_ring;
      logic [1:0] ei, hi;

      for (genvar x = 0; x < 3; x++) begin : g_rx
        for (genvar y = 0; y < 3; y++) begin : g_ry
          assign rank[x][y] = em2[GI+x-1][GJ+y-1] + had2[GI+x-1][GJ+y-1];
        end
      end

      // '>' against later neighbours, '>=' against earlier ones
      assign c_max[i][j] = (rank[1][1] >  rank[2][0]) && (rank[1][1] >  rank[2][1]) &&
                           (rank[1][1] >  rank[2][2]) && (rank[1][1] >  rank[1][2]) &&
                           (rank[1][1] >= rank[0][0]) && (rank[1][1] >= rank[0][1]) &&
                           (rank[1][1] >= rank[0][2]) && (rank[1][1] >= rank[1][0]);

      assign p0 = SW'(em[GI][GJ])   + SW'(em[GI+1][GJ]);     // eta pairs
      assign p1 = SW'(em[GI][GJ+1]) + SW'(em[GI+1][GJ+1]);
      assign p2 = SW'(em[GI][GJ])   + SW'(em[GI][GJ+1]);     // phi pairs
      assign p3 = SW'(em[GI+1][GJ]) + SW'(em[GI+1][GJ+1]);

      always_comb begin
        clus = p0;
        if (p1 > clus) clus = p1;
        if (p2 > clus) clus = p2;
        if (p3 > clus) clus = p3;
        em4  = '0;
        had4 = '0;
        for (int x = -1; x <= 2; x++)
          for (int y = -1; y <= 2; y++) begin
            em4  += SW'(em[GI+x][GJ+y]);
            had4 += SW'(had[GI+x][GJ+y]);
          end
      end

      assign had_core = had2[GI][GJ];
      assign tau_et   = clus + had_core;
      assign em_ring  = em4 - em2[GI][GJ];
      assign had_ring = had4 - had_core;
      assign ei       = levels(em_ring, cfg.em_iso);
      assign hi       = levels(had_ring, cfg.had_iso);

      always_comb begin
        for (int d = 0; d < CP_N_DEF; d++) begin
          if (d >= CP_N_DEF / 2 && defs[d].tau)
            c_hit[i][j][d] = (tau_et > defs[d].clus) && (em_ring <= defs[d].em_iso) &&
                             (had_ring <= defs[d].had_iso);
          else
            c_hit[i][j][d] = (clus > defs[d].clus) && (em_ring <= defs[d].em_iso) &&
                             (had_core <= defs[d].had_iso);
        end
        c_em[i][j].present  = clus > cfg.roi_min;
        c_em[i][j].et       = sat8(clus);
        c_em[i][j].fp       = {1'(j % 2), 1'(i % 2)};
        c_em[i][j].ei       = ei;
        c_em[i][j].hi       = hi;
        c_em[i][j].hv       = levels(had_core, {SW'(cfg.had_veto[2]), SW'(cfg.had_veto[1]),
                                                SW'(cfg.had_veto[0])});
        c_had[i][j].present = tau_et > cfg.roi_min;
        c_had[i][j].et      = sat8(tau_et);
        c_had[i][j].fp      = {1'(j % 2), 1'(i % 2)};
        c_had[i][j].ei      = ei;
        c_had[i][j].hi      = hi;
        c_had[i][j].hv      = 2'b00;
      end
    end
  end

  // Each subregion has at most one local maximum: OR the gated positions.
  logic [CP_N_SUB-1:0][CP_N_DEF-1:0] hits_c;
  logic [CP_N_SUB-1:0][1:0]          fp_c;
  cp_roi_t [CP_N_SUB-1:0]            em_c, had_c;

  always_comb begin
    hits_c = '0;
    fp_c   = '0;
    em_c   = '0;
    had_c  = '0;
    for (int i = 0; i < CORE_ETA; i++)
      for (int j = 0; j < CORE_PHI; j++)
        if (c_max[i][j]) begin
          hits_c[(j / 2) * 2 + (i / 2)] |= c_hit[i][j];
          fp_c  [(j / 2) * 2 + (i / 2)] |= {1'(j % 2), 1'(i % 2)};
          em_c  [(j / 2) * 2 + (i / 2)] |= c_em[i][j];
          had_c [(j / 2) * 2 + (i / 2)] |= c_had[i][j];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hits    <= '0;
      fp      <= '0;
      em_roi  <= '0;
      had_roi <= '0;
    end else if (en) begin
      hits    <= hits_c;
      fp      <= fp_c;
      em_roi  <= em_c;
      had_roi <= had_c;
    end
  end
endmodule
