// tb_l1calo_top: end-to-end test of l1calo_top at its default sizes: a JEP
// crate of 16 JEMs and a CP crate of 14 CPMs with their three CMX modules.
// Every bunch crossing each module gets new random jet elements or towers,
// and the shared jet and cluster definitions change too. The run alternates
// between Day-1 (legacy) and 160 Mbit/s segments and between central and
// central+forward JEM words. At each sampling edge (phase 3) the bench
// computes from its reference models what the CMX modules must deliver:
//   - Day-1: every receiver's 24-bit word, 3 clocks after the sample;
//   - 160 Mbit/s: the 12 fibres x 4 words of each CMX frame, module i at
//     frame bits 96i.., word 0 (sof) 8 clocks after the sample;
// and checks them, with no parity or framing error. In Day-1 mode the fibres
// must carry zeros. The first two crossings after a mode switch are not
// checked, nor the one just before it. Counts each mechanism (jet RoIs, JEM and CPM slot overflow, tau
// hits, multiplicity saturation, hadronic clusters, forward layout, both
// backplane modes and the switches between them) and fails any that never
// happened.
module tb_l1calo_top;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;

  localparam int N_BC  = 240;
  localparam int N_JEM = 16;
  localparam int N_CPM = 14;

  logic clk = 0, rst_n = 0, legacy_mode = 0, jem_fwd_mode = 0;
  logic [1:0] phase;
  logic [N_JEM-1:0][6:0][10:0][8:0]  je_em, je_had;
  logic [8:0]                        je_em_thr, je_had_thr;
  jet_def_t [7:0]                    jet_defs;
  logic [N_JEM-1:0][3:0][3:0]        fcal_hits;
  tt_grid_t [N_CPM-1:0]              tt_em, tt_had;
  cp_def_t [15:0]                    cp_defs;
  cp_roi_cfg_t                       cp_cfg;
  logic [N_JEM-1:0][24:0]            jem_bp;
  logic [N_CPM-1:0][1:0][24:0]       cpm_bp;
  logic [N_JEM-1:0]                  jem_overflow;
  logic [N_CPM-1:0][1:0]             cpm_overflow;
  logic [N_CPM-1:0][15:0][1:0]       cp_roi_fp;
  logic [N_JEM-1:0][23:0]            jet_cmx_day1;
  logic [N_CPM-1:0][1:0][23:0]       cp_cmx_day1;
  logic [N_JEM-1:0]                  jet_cmx_day1_valid;
  logic [N_CPM-1:0][1:0]             cp_cmx_day1_valid;
  logic [N_JEM-1:0]                  jet_cmx_err;
  logic [N_CPM-1:0][1:0]             cp_cmx_err;
  logic [11:0][31:0]                 jet_topo;
  logic [1:0][11:0][31:0]            cp_topo;
  logic [2:0]                        topo_sof;

  l1calo_top dut (.*);

  always #5 clk = ~clk;

  typedef logic [12*128-1:0] frame_t;
  typedef struct {
    bit                     legacy;
    bit                     settled;
    frame_t                 frame [3];    // jet CMX, EM CMX, hadronic CMX
    logic [N_JEM-1:0][23:0] jd1;
    logic [N_CPM-1:0][1:0][23:0] cd1;
  } exp_t;

  exp_t exp_at[int];
  int   cyc = 0;
  int   checks = 0, failures = 0;
  int   n_jet_roi = 0, n_jem_ovf = 0, n_cpm_ovf = 0, n_tau = 0, n_sat = 0;
  int   n_had_clus = 0, n_fwd = 0, n_legacy = 0, n_fast = 0, n_switch = 0;
  int   n_frames = 0, n_d1_checked = 0;
  int   since_switch = 0;
  bit   last_legacy = 0;
  int   widx[3] = '{9, 9, 9};
  int   wkey[3];

  function automatic int cnt(input logic [15:0][15:0] h, input int n, input int t, input int maxc);
    int c = 0;
    for (int r = 0; r < n; r++) c += h[r][t];
    if (c >= maxc) n_sat++;
    return (c > maxc) ? maxc : c;
  endfunction

  // Expected CMX outputs for the inputs sampled at this edge.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && phase == 2'd3) begin
      automatic exp_t e;
      e.legacy = legacy_mode;
      if (legacy_mode != last_legacy) begin
        since_switch = 0;
        n_switch++;
      end else since_switch++;
      last_legacy = legacy_mode;
      e.settled = since_switch >= 2;
      for (int x = 0; x < 3; x++) e.frame[x] = '0;
      e.jd1 = '0;
      e.cd1 = '0;
      for (int m = 0; m < N_JEM; m++) begin
        automatic je_grid_t g;
        automatic jet_roi_t [7:0] jr;
        automatic logic [15:0][15:0] jh = '0, fh = '0;
        automatic int np = 0;
        for (int a = 0; a < 7; a++)
          for (int b = 0; b < 11; b++)
            g[a][b] = ref_je(je_em[m][a][b], je_had[m][a][b], je_em_thr, je_had_thr);
        ref_jets(g, jet_defs, jr);
        e.frame[0][96*m +: 96] = ref_jem160(jr);
        for (int s = 0; s < 8; s++) jh[s] = 16'(jr[s].hits);
        for (int s = 0; s < 4; s++) fh[s] = 16'(fcal_hits[m][s]);
        if (jem_fwd_mode) begin
          for (int t = 0; t < 8; t++) e.jd1[m][2*t +: 2] = 2'(cnt(jh, 8, t, 3));
          for (int t = 0; t < 4; t++) e.jd1[m][16 + 2*t +: 2] = 2'(cnt(fh, 4, t, 3));
        end else
          for (int t = 0; t < 8; t++) e.jd1[m][3*t +: 3] = 3'(cnt(jh, 8, t, 7));
        for (int s = 0; s < 8; s++) np += jr[s].present;
        n_jet_roi += np;
        n_jem_ovf += (np > 4);
      end
      for (int m = 0; m < N_CPM; m++) begin
        automatic logic [15:0][15:0] ch;
        automatic logic [15:0][1:0] cfp;
        automatic cp_roi_t [15:0] er, hr;
        automatic int np = 0;
        ref_cp(tt_em[m], tt_had[m], cp_defs, cp_cfg, ch, cfp, er, hr);
        e.frame[1][96*m +: 96] = ref_cpm160(er, 0);
        e.frame[2][96*m +: 96] = ref_cpm160(hr, 1);
        for (int k = 0; k < 2; k++)
          for (int t = 0; t < 8; t++) e.cd1[m][k][3*t +: 3] = 3'(cnt(ch, 16, 8*k + t, 7));
        for (int s = 0; s < 16; s++) np += er[s].present;
        n_cpm_ovf += (np > 5);
        for (int s = 0; s < 16; s++) n_had_clus += hr[s].present;
        for (int s = 0; s < 16; s++)
          for (int d = 8; d < 16; d++) n_tau += cp_defs[d].tau && ch[s][d];
      end
      if (legacy_mode) for (int x = 0; x < 3; x++) e.frame[x] = '0;
      exp_at[cyc] = e;
      n_fwd    += legacy_mode && jem_fwd_mode;
      n_legacy += legacy_mode;
      n_fast   += !legacy_mode;
    end
  end

  // Check what the CMX modules deliver. cyc has already advanced past the
  // sampling edge's own count: a Day-1 word 3 clocks after the sample is
  // found at cyc - 4, a frame's word 0 (8 clocks) at cyc - 9.
  always @(negedge clk) begin
    if (jet_cmx_day1_valid[0] && exp_at.exists(cyc - 4)) begin
      automatic exp_t e = exp_at[cyc - 4];
      if (e.legacy && e.settled) begin
        n_d1_checked++;
        for (int m = 0; m < N_JEM; m++) begin
          checks += 2;
          if (!jet_cmx_day1_valid[m] || jet_cmx_day1[m] !== e.jd1[m]) begin
            failures++;
            if (failures < 6) $display("FAIL JEM %0d day1 %h exp %h", m, jet_cmx_day1[m], e.jd1[m]);
          end
          if (jet_cmx_err[m]) failures++;
        end
        for (int m = 0; m < N_CPM; m++)
          for (int k = 0; k < 2; k++) begin
            checks += 2;
            if (!cp_cmx_day1_valid[m][k] || cp_cmx_day1[m][k] !== e.cd1[m][k]) begin
              failures++;
              if (failures < 6) $display("FAIL CPM %0d/%0d day1 %h exp %h", m, k, cp_cmx_day1[m][k], e.cd1[m][k]);
            end
            if (cp_cmx_err[m][k]) failures++;
          end
      end
    end
    for (int x = 0; x < 3; x++) begin
      if (topo_sof[x]) begin
        widx[x] = 0;
        wkey[x] = cyc - 9;
      end else if (widx[x] < 9) widx[x]++;
      if (widx[x] < 4 && exp_at.exists(wkey[x])) begin
        automatic exp_t e = exp_at[wkey[x]];
        // A crossing still on its way through the link when the mode
        // switches is lost, so it is only checked when the next two
        // crossings kept the mode.
        if (e.settled && exp_at.exists(wkey[x] + 8) && exp_at[wkey[x] + 4].legacy == e.legacy
            && exp_at[wkey[x] + 8].legacy == e.legacy) begin
          if (widx[x] == 0) n_frames++;
          for (int f = 0; f < 12; f++) begin
            automatic logic [31:0] got = (x == 0) ? jet_topo[f] : cp_topo[x-1][f];
            automatic logic [31:0] want = e.frame[x][128*f + 32*widx[x] +: 32];
            checks++;
            if (got !== want) begin
              failures++;
              if (failures < 6) $display("FAIL CMX %0d fibre %0d word %0d: %h exp %h", x, f, widx[x], got, want);
            end
          end
          if (!e.legacy && widx[x] == 0) begin
            checks++;
            if (x == 0 && jet_cmx_err != 0) failures++;
            if (x > 0 && cp_cmx_err != 0) failures++;
          end
        end
      end
    end
  end

  task automatic new_event(input int bc);
    for (int m = 0; m < N_JEM; m++) begin
      automatic int busy = $urandom_range(3);
      for (int a = 0; a < 7; a++)
        for (int b = 0; b < 11; b++) begin
          je_em[m][a][b]  = (busy == 3 || $urandom_range(6 - busy) == 0) ? 9'($urandom_range(300))
                                                                         : 9'($urandom_range(4));
          je_had[m][a][b] = ($urandom_range(8) == 0) ? 9'($urandom_range(150)) : 9'($urandom_range(4));
        end
      for (int s = 0; s < 4; s++) fcal_hits[m][s] = 4'($urandom);
    end
    je_em_thr  = 9'($urandom_range(3));
    je_had_thr = 9'($urandom_range(3));
    for (int d = 0; d < 8; d++) begin
      jet_defs[d].win = jet_win_e'($urandom_range(2));
      jet_defs[d].thr = 10'($urandom_range(20 + 100 * d));
    end
    for (int m = 0; m < N_CPM; m++) begin
      automatic int busy = $urandom_range(3);
      for (int a = 0; a < 7; a++)
        for (int b = 0; b < 19; b++) begin
          tt_em[m][a][b]  = ($urandom_range(4 - busy) == 0) ? 8'($urandom_range(255)) : 8'($urandom_range(4));
          tt_had[m][a][b] = ($urandom_range(6) == 0) ? 8'($urandom_range(100)) : 8'($urandom_range(3));
        end
    end
    for (int d = 0; d < 16; d++) begin
      cp_defs[d].tau     = (d >= 8) && $urandom_range(1);
      cp_defs[d].clus    = 12'($urandom_range(5 + 20 * d));
      cp_defs[d].em_iso  = 12'($urandom_range(100, 800));
      cp_defs[d].had_iso = 12'($urandom_range(50, 400));
    end
    cp_cfg.roi_min = 12'($urandom_range(40));
    for (int l = 0; l < 3; l++) begin
      cp_cfg.em_iso[l]   = 12'($urandom_range(500));
      cp_cfg.had_iso[l]  = 12'($urandom_range(300));
      cp_cfg.had_veto[l] = 10'($urandom_range(200));
    end
    // modes: segments of 30 crossings, forward layout in every other legacy one
    legacy_mode  = (bc / 30) % 2 == 1;
    jem_fwd_mode = (bc / 60) % 2 == 1;
  endtask

  initial begin
    #(N_BC * 40 * 10 + 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_event(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int bc = 0; bc < N_BC; bc++) begin
      // change inputs just after a sampling edge
      do @(negedge clk); while (phase != 2'd0);
      new_event(bc);
    end
    repeat (16) @(negedge clk);
    checks += 11;
    if (n_jet_roi == 0)  failures++;
    if (n_jem_ovf == 0)  failures++;
    if (n_cpm_ovf == 0)  failures++;
    if (n_tau == 0)      failures++;
    if (n_sat == 0)      failures++;
    if (n_had_clus == 0) failures++;
    if (n_fwd == 0)      failures++;
    if (n_switch < 2)    failures++;
    if (n_fast == 0 || n_legacy == 0) failures++;
    if (n_frames < 3 * (N_BC - 40)) failures++;
    if (n_d1_checked < N_BC / 2 - 20) failures++;
    $display("jet RoIs %0d, JEM overflow %0d, CPM overflow %0d, tau hits %0d, saturated counts %0d",
             n_jet_roi, n_jem_ovf, n_cpm_ovf, n_tau, n_sat);
    $display("hadronic clusters %0d, forward-mode BCs %0d, legacy BCs %0d, 160M BCs %0d, switches %0d",
             n_had_clus, n_fwd, n_legacy, n_fast, n_switch);
    $display("fibre frames checked %0d, Day-1 crossings checked %0d", n_frames, n_d1_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
