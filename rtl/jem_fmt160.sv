// jem_fmt160: the 160 Mbit/s JEM-to-CMX jet format. It packs the eight jet
// RoI subregions into one 96-bit payload (four backplane words of 24 bits):
//   bits  3..0  presence P0-3        bits  5..4  fp1     bits  7..6  fp2
//   bits 11..8  presence P4-7        bits 13..12 fp3     bits 15..14 fp4
//   bits 95..16 Et stream: jet1 size1, jet1 size2, jet2 size1, ... jet4 size2,
//               10 bits each, jet1 size1 in bits 25..16.
// Payload bit n travels on backplane word n/24, line n%24. The field list and
// the order of word 0 are the specification's first ("regular") format; the
// way the Et fields run on across word boundaries is this design's reading.
// RoI slots 1..4 are the first four present subregions in index order; a
// fifth or later RoI keeps only its presence bit and raises overflow
// (design choice). Combinational.
module jem_fmt160
  import l1calo_pkg::*;
(
  input  jet_roi_t [JET_N_SUB-1:0] roi,
  output logic [PAYLOAD_W-1:0]     payload,
  output logic                     overflow
);
  logic [JET_N_SUB-1:0]                presence;
  logic [JET_N_SLOT-1:0][1:0]          fp;
  logic [JET_N_SLOT-1:0][2*JE_W-1:0]   et;    // {size2, size1} per slot

  always_comb begin
    automatic int n = 0;
    fp       = '0;
    et       = '0;
    overflow = 1'b0;
    for (int s = 0; s < JET_N_SUB; s++) begin
      presence[s] = roi[s].present;
      if (roi[s].present) begin
        if (n < JET_N_SLOT) begin
          fp[n] = roi[s].fp;
          et[n] = {roi[s].et_s2, roi[s].et_s1};
        end else begin
          overflow = 1'b1;
        end
        n++;
      end
    end
    payload = {et, fp[3], fp[2], presence[7:4], fp[1], fp[0], presence[3:0]};
  end
endmodule
