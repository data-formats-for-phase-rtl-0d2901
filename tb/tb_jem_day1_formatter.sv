// tb_jem_day1_formatter: random jet and forward threshold bits in both
// layouts. Central: field t (bits 3t+2..3t) must equal the number of
// subregions with threshold t set, clamped at 7. Central+forward: 2-bit
// fields CJ0..7 then FC0..3, clamped at 3.
module tb_jem_day1_formatter;
  import l1calo_pkg::*;
  logic             fwd_mode;
  logic [7:0][7:0]  jet_hits;
  logic [3:0][3:0]  fcal_hits;
  logic [23:0]      word;
  int checks = 0, failures = 0;

  jem_day1_formatter dut (.*);

  task automatic expect_field(input int lsb, input int w, input int v);
    int got = 0;
    for (int k = 0; k < w; k++) got |= int'(word[lsb + k]) << k;
    checks++;
    if (got != v) begin
      failures++;
      $display("FAIL fwd=%0d field@%0d got %0d exp %0d", fwd_mode, lsb, got, v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      fwd_mode = k[0];
      for (int s = 0; s < 8; s++) jet_hits[s] = 8'($urandom);
      for (int s = 0; s < 4; s++) fcal_hits[s] = 4'($urandom);
      #1;
      for (int t = 0; t < 8; t++) begin
        automatic int n = 0;
        for (int s = 0; s < 8; s++) n += jet_hits[s][t];
        if (fwd_mode) expect_field(2 * t, 2, (n > 3) ? 3 : n);
        else          expect_field(3 * t, 3, (n > 7) ? 7 : n);
      end
      if (fwd_mode)
        for (int t = 0; t < 4; t++) begin
          automatic int n = 0;
          for (int s = 0; s < 4; s++) n += fcal_hits[s][t];
          expect_field(16 + 2 * t, 2, (n > 3) ? 3 : n);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
