// l1calo_ref_pkg: reference models for the testbenches. Each function
// recomputes, from the input arrays alone, what a block of the design must
// produce: jet element sums, jet RoIs, cluster RoIs, multiplicities and the
// 160 Mbit/s payloads. They are written independently of the RTL (explicit
// window tables, bit-by-bit field placement) so a fault in the RTL shows as a
// mismatch.
package l1calo_ref_pkg;
  import l1calo_pkg::*;

  typedef logic [6:0][10:0][JE_W-1:0]  je_grid_t;
  typedef logic [6:0][18:0][TT_W-1:0]  tt_grid_t;

  function automatic logic [JE_W-1:0] ref_je(input int em, input int had,
                                             input int emt, input int hadt);
    int e = (em < emt) ? 0 : em;
    int h = (had < hadt) ? 0 : had;
    return JE_W'(e + h);
  endfunction

  // Place 'w' bits of 'v' at bit 'pos' of a 96-bit payload.
  function automatic void put(ref logic [PAYLOAD_W-1:0] p, input int pos,
                              input int w, input longint v);
    for (int k = 0; k < w; k++) p[pos + k] = v[k];
  endfunction

  function automatic int clamp(input int v, input int m);
    return (v > m) ? m : v;
  endfunction

  // ---- jet finder ----
  function automatic void ref_jets(input je_grid_t g, input jet_def_t [7:0] defs,
                                   output jet_roi_t [7:0] roi);
    int w2[6][10];     // 2x2 sums, unsaturated, lower corner (a,b)
    int w3[5][9];
    int w4[4][8];
    roi = '0;
    foreach (w2[a, b]) w2[a][b] = g[a][b] + g[a+1][b] + g[a][b+1] + g[a+1][b+1];
    foreach (w3[a, b]) begin
      w3[a][b] = 0;
      for (int x = 0; x < 3; x++) for (int y = 0; y < 3; y++) w3[a][b] += g[a+x][b+y];
    end
    foreach (w4[a, b]) begin
      w4[a][b] = 0;
      for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) w4[a][b] += g[a+x][b+y];
    end
    for (int s = 0; s < 8; s++) begin
      for (int f = 0; f < 4; f++) begin
        // subregion s: eta pair s%2, phi pair s/2; fp f = {phi, eta}
        int i  = 2 * (s % 2) + (f % 2);
        int j  = 2 * (s / 2) + (f / 2);
        int a  = i + 1, b = j + 1;
        int c  = clamp(w2[a][b], 1023);
        bit mx = 1;
        logic [7:0] h;
        // later neighbours: strict
        if (!(c > clamp(w2[a+1][b-1], 1023))) mx = 0;
        if (!(c > clamp(w2[a+1][b], 1023)))   mx = 0;
        if (!(c > clamp(w2[a+1][b+1], 1023))) mx = 0;
        if (!(c > clamp(w2[a][b+1], 1023)))   mx = 0;
        // earlier neighbours: ties allowed
        if (!(c >= clamp(w2[a-1][b-1], 1023))) mx = 0;
        if (!(c >= clamp(w2[a-1][b], 1023)))   mx = 0;
        if (!(c >= clamp(w2[a-1][b+1], 1023))) mx = 0;
        if (!(c >= clamp(w2[a][b-1], 1023)))   mx = 0;
        for (int d = 0; d < 8; d++) begin
          int t = defs[d].thr;
          case (defs[d].win)
            WIN_2X2: h[d] = c > t;
            WIN_3X3: h[d] = clamp(w3[a-1][b-1], 1023) > t || clamp(w3[a-1][b], 1023) > t ||
                            clamp(w3[a][b-1], 1023) > t   || clamp(w3[a][b], 1023) > t;
            WIN_4X4: h[d] = clamp(w4[a-1][b-1], 1023) > t;
            default: h[d] = 0;
          endcase
        end
        if (mx && h != 0) begin
          roi[s].present = 1;
          roi[s].hits    = h;
          roi[s].fp      = 2'(f);
          roi[s].et_s1   = JE_W'(c);
          roi[s].et_s2   = JE_W'(clamp(w4[a-1][b-1], 1023));
        end
      end
    end
  endfunction

  function automatic logic [PAYLOAD_W-1:0] ref_jem160(input jet_roi_t [7:0] roi);
    logic [PAYLOAD_W-1:0] p = '0;
    int n = 0;
    int fp_pos[4] = '{4, 6, 12, 14};
    for (int s = 0; s < 8; s++) p[(s < 4) ? s : s + 4] = roi[s].present;
    for (int s = 0; s < 8; s++)
      if (roi[s].present) begin
        if (n < 4) begin
          put(p, fp_pos[n], 2, roi[s].fp);
          put(p, 16 + 20 * n, 10, roi[s].et_s1);
          put(p, 26 + 20 * n, 10, roi[s].et_s2);
        end
        n++;
      end
    return p;
  endfunction

  // Multiplicity of threshold t over n RoIs' hit vectors, clamped.
  function automatic int ref_count(input logic [15:0][15:0] hits, input int n,
                                   input int t, input int maxc);
    int c = 0;
    for (int r = 0; r < n; r++) c += hits[r][t];
    return clamp(c, maxc);
  endfunction

  // ---- cluster processor ----
  function automatic void ref_cp(input tt_grid_t em, input tt_grid_t had,
                                 input cp_def_t [15:0] defs, input cp_roi_cfg_t cfg,
                                 output logic [15:0][15:0] hits,
                                 output logic [15:0][1:0] fp,
                                 output cp_roi_t [15:0] eroi, output cp_roi_t [15:0] hroi);
    hits = '0; fp = '0; eroi = '0; hroi = '0;
    for (int s = 0; s < 16; s++)
      for (int f = 0; f < 4; f++) begin
        int i = 2 * (s % 2) + (f % 2), j = 2 * (s / 2) + (f / 2);
        int a = i + 1, b = j + 1;
        int r[3][3];
        bit mx = 1;
        int pe[4], cl, hc, er, hr, tau, e4, h4;
        logic [15:0] h;
        for (int x = 0; x < 3; x++) for (int y = 0; y < 3; y++)
          r[x][y] = em[a+x-1][b+y-1] + em[a+x][b+y-1] + em[a+x-1][b+y] + em[a+x][b+y] +
                    had[a+x-1][b+y-1] + had[a+x][b+y-1] + had[a+x-1][b+y] + had[a+x][b+y];
        // r[1][1] is the window itself
        for (int x = 0; x < 3; x++) for (int y = 0; y < 3; y++) begin
          if (x == 2 || (x == 1 && y == 2)) begin
            if (!(r[1][1] > r[x][y])) mx = 0;
          end else if (!(x == 1 && y == 1)) begin
            if (!(r[1][1] >= r[x][y])) mx = 0;
          end
        end
        pe[0] = em[a][b] + em[a+1][b];
        pe[1] = em[a][b+1] + em[a+1][b+1];
        pe[2] = em[a][b] + em[a][b+1];
        pe[3] = em[a+1][b] + em[a+1][b+1];
        cl = pe[0];
        for (int k = 1; k < 4; k++) if (pe[k] > cl) cl = pe[k];
        hc = had[a][b] + had[a+1][b] + had[a][b+1] + had[a+1][b+1];
        e4 = 0; h4 = 0;
        for (int x = -1; x <= 2; x++) for (int y = -1; y <= 2; y++) begin
          e4 += em[a+x][b+y];
          h4 += had[a+x][b+y];
        end
        er  = e4 - (em[a][b] + em[a+1][b] + em[a][b+1] + em[a+1][b+1]);
        hr  = h4 - hc;
        tau = cl + hc;
        for (int d = 0; d < 16; d++)
          if (d >= 8 && defs[d].tau)
            h[d] = tau > defs[d].clus && er <= defs[d].em_iso && hr <= defs[d].had_iso;
          else
            h[d] = cl > defs[d].clus && er <= defs[d].em_iso && hc <= defs[d].had_iso;
        if (mx) begin
          int nei = 0, nhi = 0, nhv = 0;
          for (int k = 0; k < 3; k++) begin
            nei += (er <= cfg.em_iso[k]);
            nhi += (hr <= cfg.had_iso[k]);
            nhv += (hc <= cfg.had_veto[k]);
          end
          hits[s] = h;
          fp[s]   = 2'(f);
          eroi[s] = '{present: cl > cfg.roi_min, et: 8'(clamp(cl, 255)), fp: 2'(f),
                      ei: 2'(nei), hi: 2'(nhi), hv: 2'(nhv)};
          hroi[s] = '{present: tau > cfg.roi_min, et: 8'(clamp(tau, 255)), fp: 2'(f),
                      ei: 2'(nei), hi: 2'(nhi), hv: 2'b0};
        end
      end
  endfunction

  function automatic logic [PAYLOAD_W-1:0] ref_cpm160(input cp_roi_t [15:0] roi,
                                                      input bit hadronic);
    logic [PAYLOAD_W-1:0] p = '0;
    int n = 0;
    int et_pos[5]   = '{24, 32, 48, 56, 72};
    int info_pos[5] = '{16, 40, 64, 80, 88};
    for (int s = 0; s < 16; s++) p[s] = roi[s].present;
    for (int s = 0; s < 16; s++)
      if (roi[s].present) begin
        if (n < 5) begin
          put(p, et_pos[n], 8, roi[s].et);
          put(p, info_pos[n],     2, roi[s].ei);
          put(p, info_pos[n] + 2, 2, roi[s].hi);
          put(p, info_pos[n] + 4, 2, hadronic ? 0 : roi[s].hv);
          put(p, info_pos[n] + 6, 2, roi[s].fp);
        end
        n++;
      end
    return p;
  endfunction
endpackage
