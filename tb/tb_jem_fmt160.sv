// tb_jem_fmt160: random jet RoI sets (0 to 8 present) into jem_fmt160; the
// 96-bit payload is compared with the reference packing and overflow with
// "more than four RoIs present".
module tb_jem_fmt160;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  jet_roi_t [7:0]  roi;
  logic [95:0]     payload;
  logic            overflow;
  int checks = 0, failures = 0, n_ovf = 0;

  jem_fmt160 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      automatic int np = 0;
      automatic int density = $urandom_range(8);
      for (int s = 0; s < 8; s++) begin
        roi[s] = jet_roi_t'({$urandom, $urandom});
        roi[s].present = ($urandom_range(7) < density);
        np += roi[s].present;
      end
      #1;
      checks += 2;
      if (payload !== ref_jem160(roi)) begin
        failures++;
        $display("FAIL payload %h exp %h", payload, ref_jem160(roi));
      end
      if (overflow !== (np > 4)) failures++;
      n_ovf += overflow;
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
