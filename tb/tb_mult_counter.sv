// tb_mult_counter: random threshold bit patterns (sparse and dense, so the
// 3-bit counts both stay below and reach saturation) into mult_counter with
// 16 RoIs; each count is compared with a bit count clamped at 7.
module tb_mult_counter;
  logic [15:0][7:0] hits;
  logic [7:0][2:0]  mult;
  int checks = 0, failures = 0, saturated = 0;

  mult_counter #(.N_ROI(16), .N_THR(8), .W(3)) dut (.hits, .mult);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      for (int r = 0; r < 16; r++)
        hits[r] = (k % 2) ? 8'($urandom) : 8'($urandom & $urandom & $urandom);
      #1;
      for (int t = 0; t < 8; t++) begin
        automatic int n = 0;
        for (int r = 0; r < 16; r++) n += hits[r][t];
        if (n >= 7) saturated++;
        checks++;
        if (mult[t] != 3'((n > 7) ? 7 : n)) begin
          failures++;
          $display("FAIL thr %0d: n=%0d got %0d", t, n, mult[t]);
        end
      end
    end
    checks++;
    if (saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
