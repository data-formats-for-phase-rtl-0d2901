// l1calo_top: the real-time data path of one jet/energy processor (JEP)
// crate and one cluster processor (CP) crate of the calorimeter trigger, from
// the processor modules over the crate backplane into the merger modules
// (CMX), and from the CMX onto the fibres towards the topological processor.
// Everything runs on one 160 MHz clock; a free-running 2-bit phase counter
// splits it into bunch crossings of four backplane words.
//
// JEP crate, N_JEM modules: per JEM, 7x11 jet elements (EM + hadronic,
// noise-suppressed and summed by jet_element_sum) -> jet_finder -> either the
// Day-1 multiplicity word (jem_day1_formatter, central or central+forward
// layout) or the 160 Mbit/s RoI payload (jem_fmt160) -> bp_tx. The jet CMX
// has one bp_rx per JEM and a cmx_topo_tx driving 12 fibres.
// CP crate, N_CPM modules: per CPM, 7x19 EM and hadronic towers -> cp_cluster
// -> either two Day-1 merger words (cpm_merger for thresholds 0-7 and 8-15,
// built from the 16-bit CP chip ports) or two 160 Mbit/s cluster payloads
// (cpm_fmt160: EM clusters on link 0, hadronic clusters on link 1) -> two
// bp_tx. Link 0 of every CPM goes to the EM CMX, link 1 to the hadronic CMX;
// each has one bp_rx per CPM and a cmx_topo_tx.
// legacy_mode selects Day-1 (1) or 160 Mbit/s (0) formats on all links; the
// fibres then carry zeros.
//
// Timing: module inputs are sampled at the clock edge where phase == 3 (the
// algorithm blocks register there), the backplane transmitters latch at
// phase 0, a Day-1 word is out of the CMX receivers 3 clocks after the sample,
// a 160 Mbit/s payload 6 clocks after it, and word 0 of the fibre frame
// (sof) 8 clocks after it.
// Not part of this design: the JEM energy-sum link, the forward jet algorithm
// (its threshold bits enter on fcal_hits), the fibre transceivers with their
// 8b/10b coding, and what the CMX does beyond receiving and forwarding.
module l1calo_top
  import l1calo_pkg::*;
#(
  parameter int N_JEM      = 16,
  parameter int N_CPM      = 14,
  parameter int N_FIBRE    = 12,
  parameter int JE_ETA     = 7,
  parameter int JE_PHI     = 11,
  parameter int TT_ETA     = 7,
  parameter int TT_PHI     = 19,
  parameter int N_FCAL_ROI = 4
) (
  input  logic                                                 clk,
  input  logic                                                 rst_n,
  input  logic                                                 legacy_mode,
  input  logic                                                 jem_fwd_mode,
  output logic [1:0]                                           phase,
  // JEM inputs
  input  logic [N_JEM-1:0][JE_ETA-1:0][JE_PHI-1:0][JE_IN_W-1:0] je_em,
  input  logic [N_JEM-1:0][JE_ETA-1:0][JE_PHI-1:0][JE_IN_W-1:0] je_had,
  input  logic [JE_IN_W-1:0]                                   je_em_thr,
  input  logic [JE_IN_W-1:0]                                   je_had_thr,
  input  jet_def_t [JET_N_DEF-1:0]                             jet_defs,
  input  logic [N_JEM-1:0][N_FCAL_ROI-1:0][3:0]                fcal_hits,
  // CPM inputs
  input  logic [N_CPM-1:0][TT_ETA-1:0][TT_PHI-1:0][TT_W-1:0]    tt_em,
  input  logic [N_CPM-1:0][TT_ETA-1:0][TT_PHI-1:0][TT_W-1:0]    tt_had,
  input  cp_def_t [CP_N_DEF-1:0]                               cp_defs,
  input  cp_roi_cfg_t                                          cp_cfg,
  // backplane lines and module status
  output logic [N_JEM-1:0][BP_LINES-1:0]                       jem_bp,
  output logic [N_CPM-1:0][1:0][BP_LINES-1:0]                  cpm_bp,
  output logic [N_JEM-1:0]                                     jem_overflow,
  output logic [N_CPM-1:0][1:0]                                cpm_overflow,
  output logic [N_CPM-1:0][CP_N_SUB-1:0][1:0]                  cp_roi_fp,
  // CMX receivers
  output logic [N_JEM-1:0][BP_DATA-1:0]                        jet_cmx_day1,
  output logic [N_CPM-1:0][1:0][BP_DATA-1:0]                   cp_cmx_day1,
  output logic [N_JEM-1:0]                                     jet_cmx_day1_valid,
  output logic [N_CPM-1:0][1:0]                                cp_cmx_day1_valid,
  output logic [N_JEM-1:0]                                     jet_cmx_err,
  output logic [N_CPM-1:0][1:0]                                cp_cmx_err,
  // fibres to the topological processor: jet CMX, EM CMX, hadronic CMX
  output logic [N_FIBRE-1:0][31:0]                             jet_topo,
  output logic [1:0][N_FIBRE-1:0][31:0]                        cp_topo,
  output logic [2:0]                                           topo_sof
);
  logic bc_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 2'd1;
  end
  assign bc_en = (phase == 2'd3);

  // ================= JEP crate =================
  logic [N_JEM-1:0][PAYLOAD_W-1:0] jet_rx_pl;
  logic [N_JEM-1:0]                jet_rx_valid;

  for (genvar m = 0; m < N_JEM; m++) begin : g_jem
    logic [JE_ETA-1:0][JE_PHI-1:0][JE_W-1:0] je;
    jet_roi_t [JET_N_SUB-1:0]               roi;
    logic [JET_N_SUB-1:0][JET_N_DEF-1:0]    hits;
    logic [N_FCAL_ROI-1:0][3:0]             fcal_q;
    logic [BP_DATA-1:0]                     day1;
    logic [PAYLOAD_W-1:0]                   payload;
    logic                                   par_err, frame_err, d1_par_err;

    for (genvar a = 0; a < JE_ETA; a++) begin : g_eta
      for (genvar b = 0; b < JE_PHI; b++) begin : g_phi
        jet_element_sum #(.IN_W(JE_IN_W), .OUT_W(JE_W)) u_je (
          .em_et(je_em[m][a][b]), .had_et(je_had[m][a][b]),
          .em_thr(je_em_thr), .had_thr(je_had_thr), .je_et(je[a][b]));
      end
    end

    jet_finder #(.ETA(JE_ETA), .PHI(JE_PHI)) u_jet (
      .clk, .rst_n, .en(bc_en), .je, .defs(jet_defs), .roi);

    always_comb
      for (int s = 0; s < JET_N_SUB; s++) hits[s] = roi[s].hits;

    // Forward jet bits are sampled on the same edge as the jet finder's
    // inputs so that both parts of the Day-1 word belong to one crossing.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     fcal_q <= '0;
      else if (bc_en) fcal_q <= fcal_hits[m];
    end

    jem_day1_formatter #(.N_FCAL_ROI(N_FCAL_ROI)) u_d1 (
      .fwd_mode(jem_fwd_mode), .jet_hits(hits), .fcal_hits(fcal_q), .word(day1));

    jem_fmt160 u_f160 (.roi, .payload, .overflow(jem_overflow[m]));

    bp_tx u_tx (.clk, .rst_n, .phase, .legacy(legacy_mode),
                .payload, .day1, .lines(jem_bp[m]));

    // jet CMX receiver for this JEM
    bp_rx u_rx (.clk, .rst_n, .phase, .legacy(legacy_mode), .lines(jem_bp[m]),
                .payload(jet_rx_pl[m]), .valid(jet_rx_valid[m]),
                .par_err, .frame_err, .day1(jet_cmx_day1[m]),
                .day1_valid(jet_cmx_day1_valid[m]), .day1_par_err(d1_par_err));

    assign jet_cmx_err[m] = legacy_mode ? d1_par_err : (par_err | frame_err);
  end

  cmx_topo_tx #(.N_LINK(N_JEM), .N_FIBRE(N_FIBRE), .FIBRE_W(32)) u_jet_topo (
    .clk, .rst_n, .phase, .payload(jet_rx_pl), .valid(jet_rx_valid),
    .fibre(jet_topo), .sof(topo_sof[0]));

  // ================= CP crate =================
  logic [1:0][N_CPM-1:0][PAYLOAD_W-1:0] cp_rx_pl;     // [CMX][CPM]
  logic [1:0][N_CPM-1:0]                cp_rx_valid;

  for (genvar m = 0; m < N_CPM; m++) begin : g_cpm
    logic [CP_N_SUB-1:0][CP_N_DEF-1:0] hits;
    cp_roi_t [CP_N_SUB-1:0]            em_roi, had_roi;
    logic [1:0][CP_N_CHIP-1:0][15:0]   chip_port;   // [merger][chip]
    logic [1:0][BP_DATA-1:0]           day1;
    logic [1:0][PAYLOAD_W-1:0]         payload;

    cp_cluster #(.ETA(TT_ETA), .PHI(TT_PHI)) u_cp (
      .clk, .rst_n, .en(bc_en), .em(tt_em[m]), .had(tt_had[m]), .defs(cp_defs),
      .cfg(cp_cfg), .hits, .fp(cp_roi_fp[m]), .em_roi, .had_roi);

    // CP chip c serves subregions 2c (L) and 2c+1 (R); merger k takes
    // thresholds 8k..8k+7 of both.
    always_comb
      for (int k = 0; k < 2; k++)
        for (int c = 0; c < CP_N_CHIP; c++)
          chip_port[k][c] = {hits[2*c+1][8*k +: 8], hits[2*c][8*k +: 8]};

    cpm_fmt160 #(.HADRONIC(1'b0)) u_em  (.roi(em_roi),  .payload(payload[0]),
                                         .overflow(cpm_overflow[m][0]));
    cpm_fmt160 #(.HADRONIC(1'b1)) u_had (.roi(had_roi), .payload(payload[1]),
                                         .overflow(cpm_overflow[m][1]));

    for (genvar k = 0; k < 2; k++) begin : g_link
      logic par_err, frame_err, d1_par_err;

      cpm_merger #(.N_CHIP(CP_N_CHIP)) u_merger (.chip_port(chip_port[k]), .word(day1[k]));

      bp_tx u_tx (.clk, .rst_n, .phase, .legacy(legacy_mode),
                  .payload(payload[k]), .day1(day1[k]), .lines(cpm_bp[m][k]));

      // receiver in CMX k for this CPM
      bp_rx u_rx (.clk, .rst_n, .phase, .legacy(legacy_mode), .lines(cpm_bp[m][k]),
                  .payload(cp_rx_pl[k][m]), .valid(cp_rx_valid[k][m]),
                  .par_err, .frame_err, .day1(cp_cmx_day1[m][k]),
                  .day1_valid(cp_cmx_day1_valid[m][k]), .day1_par_err(d1_par_err));

      assign cp_cmx_err[m][k] = legacy_mode ? d1_par_err : (par_err | frame_err);
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_cp_cmx
    cmx_topo_tx #(.N_LINK(N_CPM), .N_FIBRE(N_FIBRE), .FIBRE_W(32)) u_topo (
      .clk, .rst_n, .phase, .payload(cp_rx_pl[k]), .valid(cp_rx_valid[k]),
      .fibre(cp_topo[k]), .sof(topo_sof[1+k]));
  end
endmodule
