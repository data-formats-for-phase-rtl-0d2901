// cpm_merger: Day-1 merger FPGA of a CPM. Each of the eight CP chips sends it,
// every bunch crossing, a 16-bit port holding eight threshold bits for each
// of the chip's two subregions (bits 7..0 left subregion, 15..8 right; the
// bit order is this design's choice). The merger counts, per threshold, the
// subregions that passed, over all sixteen, and sends eight 3-bit
// multiplicities, threshold t in bits 3t+2..3t; bp_tx adds odd parity.
// A CPM has two mergers, one for thresholds 0-7 and one for 8-15, as in the
// specification. Counts saturate at 7 (design choice). Combinational.
module cpm_merger
  import l1calo_pkg::*;
#(
  parameter int N_CHIP = 8
) (
  input  logic [N_CHIP-1:0][15:0] chip_port,
  output logic [BP_DATA-1:0]      word
);
  logic [2*N_CHIP-1:0][7:0] hits;

  always_comb begin
    for (int c = 0; c < N_CHIP; c++) begin
      hits[2*c]     = chip_port[c][7:0];
      hits[2*c + 1] = chip_port[c][15:8];
    end
  end

  mult_counter #(.N_ROI(2*N_CHIP), .N_THR(8), .W(3)) u_mult (
    .hits(hits), .mult(word));
endmodule
