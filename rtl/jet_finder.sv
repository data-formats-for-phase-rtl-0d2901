// jet_finder: the JEM jet algorithm. Input is a 7x11 (eta x phi) array of
// 10-bit jet element Et: the JEM's 4x8 core at eta 1..4, phi 1..8, plus the
// environment copied from neighbouring modules. A 2x2 window slides over the
// core in steps of one element; a window is a jet core when its Et is a local
// maximum among its eight overlapping neighbours. Each of the eight jet
// definitions names a window size and a threshold:
//   2x2 - the core window itself,
//   3x3 - the four 3x3 windows containing the core; any one passing is enough,
//   4x4 - the window with the core at its centre.
// Sums saturate at 10 bits. The core is split into eight 2x2 subregions, and a
// subregion can hold at most one core, which gives per subregion eight
// threshold bits and a 2-bit fine position, as in the specification.
// For the 160 Mbit/s format each RoI also carries the 2x2 ("jet size 1") and
// 4x4 ("jet size 2") Et.
// Design choices: the local maximum is '>' against the four neighbours that
// come later in (eta, phi) order and '>=' against the four earlier ones, so a
// flat plateau yields exactly one core; a definition passes when sum > thr;
// subregion s = 2*(phi/2) + eta/2 of the core position; fp = {phi&1, eta&1};
// an RoI is 'present' when its core passes any definition.
// Timing: combinational algorithm, result registered when en is high
// (once per bunch crossing), so roi is valid one clock after en.
module jet_finder
  import l1calo_pkg::*;
#(
  parameter int ETA = 7,
  parameter int PHI = 11
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [ETA-1:0][PHI-1:0][JE_W-1:0] je,
  input  jet_def_t [JET_N_DEF-1:0]       defs,
  output jet_roi_t [JET_N_SUB-1:0]       roi
);
  localparam int CORE_ETA = ETA - 3;   // 4
  localparam int CORE_PHI = PHI - 3;   // 8
  localparam int MAXV = (1 << JE_W) - 1;

  typedef logic [JE_W-1:0] et_t;

  function automatic et_t sat(input logic [JE_W+3:0] v);
    return (v > (JE_W+4)'(MAXV)) ? et_t'(MAXV) : v[JE_W-1:0];
  endfunction

  // Window sums, indexed by the window's lower corner, saturated to 10 bits.
  et_t w2 [ETA-1][PHI-1];
  et_t w3 [ETA-2][PHI-2];
  et_t w4 [ETA-3][PHI-3];

  for (genvar a = 0; a < ETA - 1; a++) begin : g_w2a
    for (genvar b = 0; b < PHI - 1; b++) begin : g_w2b
      assign w2[a][b] = sat((JE_W+4)'(je[a][b]) + (JE_W+4)'(je[a+1][b]) +
                            (JE_W+4)'(je[a][b+1]) + (JE_W+4)'(je[a+1][b+1]));
    end
  end

  for (genvar a = 0; a < ETA - 2; a++) begin : g_w3a
    for (genvar b = 0; b < PHI - 2; b++) begin : g_w3b
      logic [JE_W+3:0] s;
      always_comb begin
        s = '0;
        for (int x = 0; x < 3; x++)
          for (int y = 0; y < 3; y++)
            s += (JE_W+4)'(je[a+x][b+y]);
      end
      assign w3[a][b] = sat(s);
    end
  end

  for (genvar a = 0; a < ETA - 3; a++) begin : g_w4a
    for (genvar b = 0; b < PHI - 3; b++) begin : g_w4b
      logic [JE_W+3:0] s;
      always_comb begin
        s = '0;
        for (int x = 0; x < 4; x++)
          for (int y = 0; y < 4; y++)
            s += (JE_W+4)'(je[a+x][b+y]);
      end
      assign w4[a][b] = sat(s);
    end
  end

  // One candidate per core position (i, j); its 2x2 window is w2[i+1][j+1].
  jet_roi_t cand [CORE_ETA][CORE_PHI];

  for (genvar i = 0; i < CORE_ETA; i++) begin : g_ci
    for (genvar j = 0; j < CORE_PHI; j++) begin : g_cj
      localparam int GI = i + 1;
      localparam int GJ = j + 1;
      et_t                  core;
      logic                 is_max;
      logic [JET_N_DEF-1:0] hit;

      assign core = w2[GI][GJ];
      // '>' against later neighbours, '>=' against earlier ones
      assign is_max = (core >  w2[GI+1][GJ-1]) && (core >  w2[GI+1][GJ]) &&
                      (core >  w2[GI+1][GJ+1]) && (core >  w2[GI][GJ+1]) &&
                      (core >= w2[GI-1][GJ-1]) && (core >= w2[GI-1][GJ]) &&
                      (core >= w2[GI-1][GJ+1]) && (core >= w2[GI][GJ-1]);

      always_comb begin
        for (int d = 0; d < JET_N_DEF; d++) begin
          unique case (defs[d].win)
            WIN_2X2: hit[d] = core > defs[d].thr;
            WIN_3X3: hit[d] = (w3[GI-1][GJ-1] > defs[d].thr) || (w3[GI-1][GJ] > defs[d].thr) ||
                              (w3[GI][GJ-1]   > defs[d].thr) || (w3[GI][GJ]   > defs[d].thr);
            WIN_4X4: hit[d] = w4[GI-1][GJ-1] > defs[d].thr;
            default: hit[d] = 1'b0;
          endcase
        end
        cand[i][j]         = '0;
        cand[i][j].present = is_max && (|hit);
        cand[i][j].hits    = hit;
        cand[i][j].fp      = {1'(j % 2), 1'(i % 2)};
        cand[i][j].et_s1   = core;
        cand[i][j].et_s2   = w4[GI-1][GJ-1];
      end
    end
  end

  // A subregion holds at most one local maximum, so the present candidate
  // (if any) is selected by OR-ing the gated candidates.
  jet_roi_t [JET_N_SUB-1:0] roi_c;

  always_comb begin
    roi_c = '0;
    for (int i = 0; i < CORE_ETA; i++)
      for (int j = 0; j < CORE_PHI; j++)
        if (cand[i][j].present)
          roi_c[(j / 2) * 2 + (i / 2)] |= cand[i][j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  roi <= '0;
    else if (en) roi <= roi_c;
  end
endmodule
