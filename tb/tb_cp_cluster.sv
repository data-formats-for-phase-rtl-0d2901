// tb_cp_cluster: random 7x19 EM and hadronic tower arrays and random cluster
// definitions (half of 8..15 in tau mode) into cp_cluster. Threshold bits,
// fine positions and both RoI record sets, registered on en, must equal the
// reference one clock after en. Counts EM hits, tau hits and RoIs seen.
module tb_cp_cluster;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  tt_grid_t          em, had;
  cp_def_t [15:0]    defs;
  cp_roi_cfg_t       cfg;
  logic [15:0][15:0] hits, e_hits;
  logic [15:0][1:0]  fp, e_fp;
  cp_roi_t [15:0]    em_roi, had_roi, e_em, e_had;
  int checks = 0, failures = 0, n_em = 0, n_tau = 0, n_roi = 0;

  cp_cluster dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    em = '0; had = '0; defs = '0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      for (int a = 0; a < 7; a++)
        for (int b = 0; b < 19; b++) begin
          em[a][b]  = ($urandom_range(4) == 0) ? 8'($urandom_range(255)) : 8'($urandom_range(4));
          had[a][b] = ($urandom_range(6) == 0) ? 8'($urandom_range(120)) : 8'($urandom_range(3));
        end
      for (int d = 0; d < 16; d++) begin
        defs[d].tau     = (d >= 8) && $urandom_range(1);
        defs[d].clus    = 12'($urandom_range(400));
        defs[d].em_iso  = 12'($urandom_range(600));
        defs[d].had_iso = 12'($urandom_range(300));
      end
      cfg.roi_min = 12'($urandom_range(100));
      for (int l = 0; l < 3; l++) begin
        cfg.em_iso[l]   = 12'($urandom_range(500));
        cfg.had_iso[l]  = 12'($urandom_range(300));
        cfg.had_veto[l] = 10'($urandom_range(200));
      end
      ref_cp(em, had, defs, cfg, e_hits, e_fp, e_em, e_had);
      @(negedge clk);
      en = 1;
      @(negedge clk);
      en = 0;
      checks += 4;
      if (hits !== e_hits)   begin failures++; if (failures < 5) $display("FAIL hits %h exp %h", hits, e_hits); end
      if (fp !== e_fp)       failures++;
      if (em_roi !== e_em)   begin failures++; if (failures < 5) $display("FAIL em_roi %h exp %h", em_roi, e_em); end
      if (had_roi !== e_had) failures++;
      for (int s = 0; s < 16; s++) begin
        for (int d = 0; d < 16; d++) begin
          n_em  += e_hits[s][d] && !(d >= 8 && defs[d].tau);
          n_tau += e_hits[s][d] && (d >= 8 && defs[d].tau);
        end
        n_roi += e_em[s].present + e_had[s].present;
      end
    end
    checks += 3;
    if (n_em == 0)  failures++;
    if (n_tau == 0) failures++;
    if (n_roi == 0) failures++;
    $display("EM hits %0d, tau hits %0d, RoI records %0d", n_em, n_tau, n_roi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
