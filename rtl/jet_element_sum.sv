// jet_element_sum: forms the Et of one jet element on the JEM. The 9-bit
// electromagnetic and 9-bit hadronic sums of the element's four trigger towers
// are noise-suppressed separately, each against its own threshold, and then
// added into one 10-bit Et with a 1 GeV least count, as the specification
// describes. This design's choices: a sum is kept when it is >= its threshold
// and zeroed otherwise; the block is combinational (the jet finder registers).
// Two 9-bit values never exceed 1022, so no saturation is needed.
module jet_element_sum #(
  parameter int IN_W  = 9,
  parameter int OUT_W = 10
) (
  input  logic [IN_W-1:0]  em_et,
  input  logic [IN_W-1:0]  had_et,
  input  logic [IN_W-1:0]  em_thr,
  input  logic [IN_W-1:0]  had_thr,
  output logic [OUT_W-1:0] je_et
);
  logic [IN_W-1:0] em_cut, had_cut;

  always_comb begin
    em_cut  = (em_et  >= em_thr)  ? em_et  : '0;
    had_cut = (had_et >= had_thr) ? had_et : '0;
    je_et   = OUT_W'(em_cut) + OUT_W'(had_cut);
  end
endmodule
