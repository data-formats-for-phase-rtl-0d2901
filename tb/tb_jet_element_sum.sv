// tb_jet_element_sum: drives random and corner-case EM/hadronic jet element
// sums and noise thresholds into jet_element_sum and compares the 10-bit
// result with the reference (each part zeroed below its threshold, then
// added).
module tb_jet_element_sum;
  import l1calo_ref_pkg::*;
  logic [8:0] em_et, had_et, em_thr, had_thr;
  logic [9:0] je_et;
  int checks = 0, failures = 0;

  jet_element_sum dut (.*);

  task automatic check_one(input int e, input int h, input int et, input int ht);
    em_et = 9'(e); had_et = 9'(h); em_thr = 9'(et); had_thr = 9'(ht);
    #1;
    checks++;
    if (je_et !== ref_je(e, h, et, ht)) begin
      failures++;
      $display("FAIL em=%0d had=%0d thr=%0d/%0d got %0d", e, h, et, ht, je_et);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(511, 511, 0, 0);      // largest sum, 1022
    check_one(5, 7, 5, 8);          // EM at threshold kept, had below cut
    check_one(4, 8, 5, 8);
    check_one(0, 0, 0, 0);
    for (int k = 0; k < 2000; k++)
      check_one($urandom_range(511), $urandom_range(511), $urandom_range(20), $urandom_range(20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
