// tb_cpm_fmt160: random cluster record sets (0 to 16 present) into an EM and a
// hadronic instance of cpm_fmt160; payloads are compared with the reference
// packing (hv blank on the hadronic link) and overflow with "more than five".
module tb_cpm_fmt160;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  cp_roi_t [15:0] roi;
  logic [95:0]    pe, ph;
  logic           oe, oh;
  int checks = 0, failures = 0, n_ovf = 0;

  cpm_fmt160 #(.HADRONIC(1'b0)) dut_em  (.roi, .payload(pe), .overflow(oe));
  cpm_fmt160 #(.HADRONIC(1'b1)) dut_had (.roi, .payload(ph), .overflow(oh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      automatic int np = 0;
      automatic int density = $urandom_range(10);
      for (int s = 0; s < 16; s++) begin
        roi[s] = cp_roi_t'($urandom);
        roi[s].present = ($urandom_range(15) < density);
        np += roi[s].present;
      end
      #1;
      checks += 4;
      if (pe !== ref_cpm160(roi, 0)) begin
        failures++;
        $display("FAIL em %h exp %h", pe, ref_cpm160(roi, 0));
      end
      if (ph !== ref_cpm160(roi, 1)) begin
        failures++;
        $display("FAIL had %h exp %h", ph, ref_cpm160(roi, 1));
      end
      if (oe !== (np > 5) || oh !== (np > 5)) failures++;
      n_ovf += oe;
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
