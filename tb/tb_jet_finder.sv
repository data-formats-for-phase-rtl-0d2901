// tb_jet_finder: random 7x11 jet element arrays (sparse, dense and with
// saturating values) and random jet definitions into jet_finder. The RoIs,
// registered on en, must match the reference one clock after en and must
// hold while en is low. Counts how often RoIs, the 3x3 "any of four"
// case and 10-bit saturation occur, and fails if one never does.
module tb_jet_finder;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  je_grid_t        je;
  jet_def_t [7:0]  defs;
  jet_roi_t [7:0]  roi, expd;
  int checks = 0, failures = 0, n_roi = 0, n_sat = 0, n_win3 = 0;

  jet_finder dut (.clk, .rst_n, .en, .je, .defs, .roi);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    je = '0; defs = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      automatic int mode = k % 4;
      for (int a = 0; a < 7; a++)
        for (int b = 0; b < 11; b++)
          case (mode)
            0: je[a][b] = ($urandom_range(9) == 0) ? 10'($urandom_range(200)) : 10'($urandom_range(3));
            1: je[a][b] = 10'($urandom_range(60));
            2: je[a][b] = ($urandom_range(3) == 0) ? 10'($urandom_range(1022)) : 10'd0;
            default: je[a][b] = 10'($urandom_range(4));
          endcase
      for (int d = 0; d < 8; d++) begin
        defs[d].win = jet_win_e'($urandom_range(2));
        defs[d].thr = (mode == 2) ? 10'($urandom_range(1023)) : 10'($urandom_range(300));
      end
      ref_jets(je, defs, expd);
      @(negedge clk);
      en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (roi !== expd) begin
        failures++;
        if (failures < 5) $display("FAIL event %0d: got %h exp %h", k, roi, expd);
      end
      for (int s = 0; s < 8; s++) begin
        n_roi += expd[s].present;
        n_sat += expd[s].present && expd[s].et_s2 == 10'd1023;
      end
      for (int d = 0; d < 8; d++)
        if (defs[d].win == WIN_3X3)
          for (int s = 0; s < 8; s++) n_win3 += expd[s].hits[d];
      // registered output holds while en is low
      je = ~je;
      @(negedge clk);
      checks++;
      if (roi !== expd) failures++;
    end
    checks += 3;
    if (n_roi == 0)  failures++;
    if (n_sat == 0)  failures++;
    if (n_win3 == 0) failures++;
    $display("jet RoIs %0d, saturated 4x4 sums %0d, 3x3 hits %0d", n_roi, n_sat, n_win3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
