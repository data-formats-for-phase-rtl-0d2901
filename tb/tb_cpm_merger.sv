// tb_cpm_merger: random 16-bit CP chip ports into cpm_merger; each 3-bit
// field t must be the number of the 16 subregions (low and high byte of each
// port) with threshold t set, clamped at 7.
module tb_cpm_merger;
  logic [7:0][15:0] chip_port;
  logic [23:0]      word;
  int checks = 0, failures = 0;

  cpm_merger dut (.chip_port, .word);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int c = 0; c < 8; c++)
        chip_port[c] = (k % 3 == 0) ? 16'($urandom) : 16'($urandom & $urandom & $urandom);
      #1;
      for (int t = 0; t < 8; t++) begin
        automatic int n = 0;
        for (int c = 0; c < 8; c++) n += chip_port[c][t] + chip_port[c][8 + t];
        checks++;
        if (word[3*t +: 3] != 3'((n > 7) ? 7 : n)) begin
          failures++;
          $display("FAIL thr %0d n=%0d got %0d", t, n, word[3*t +: 3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
