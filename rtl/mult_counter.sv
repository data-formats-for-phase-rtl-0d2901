// mult_counter: threshold multiplicity counter used by the Day-1 formats.
// For each of N_THR thresholds it counts how many of N_ROI RoIs set that
// threshold bit and clamps the count to the W-bit field (2^W-1), so a 3-bit
// field reads 7 for seven or more RoIs. The counting follows the Day-1
// "multiplicities" of the specification; clamping is this design's choice.
// Purely combinational.
module mult_counter #(
  parameter int N_ROI = 8,
  parameter int N_THR = 8,
  parameter int W     = 3
) (
  input  logic [N_ROI-1:0][N_THR-1:0] hits,
  output logic [N_THR-1:0][W-1:0]     mult
);
  localparam int unsigned MAXC = (1 << W) - 1;

  always_comb begin
    for (int t = 0; t < N_THR; t++) begin
      automatic int unsigned n = 0;
      for (int r = 0; r < N_ROI; r++)
        n += 32'(hits[r][t]);
      mult[t] = (n > MAXC) ? W'(MAXC) : W'(n);
    end
  end
endmodule
