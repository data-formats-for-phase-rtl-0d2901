// jem_day1_formatter: the Day-1 (40 Mbit/s) real-time word of a JEM, 24 data
// bits per bunch crossing; the odd parity on line 24 is added by bp_tx.
//   fwd_mode = 0: eight 3-bit multiplicities, threshold t in bits 3t+2..3t.
//   fwd_mode = 1: twelve 2-bit multiplicities, central jet definitions CJ0..7
//                 in bits 2t+1..2t, forward definitions FC0..3 in bits
//                 17..16 up to 23..22.
// Both layouts are the specification's. Counts saturate at the field size
// (design choice). The forward jet algorithm is not part of this design: its
// threshold bits arrive on fcal_hits, N_FCAL_ROI RoIs of four bits each
// (the RoI count is this design's assumption). Combinational.
module jem_day1_formatter
  import l1calo_pkg::*;
#(
  parameter int N_FCAL_ROI = 4
) (
  input  logic                                 fwd_mode,
  input  logic [JET_N_SUB-1:0][JET_N_DEF-1:0]  jet_hits,
  input  logic [N_FCAL_ROI-1:0][3:0]           fcal_hits,
  output logic [BP_DATA-1:0]                   word
);
  logic [JET_N_DEF-1:0][2:0] cj3;
  logic [JET_N_DEF-1:0][1:0] cj2;
  logic [3:0][1:0]           fc2;

  mult_counter #(.N_ROI(JET_N_SUB), .N_THR(JET_N_DEF), .W(3)) u_cj3 (
    .hits(jet_hits), .mult(cj3));
  mult_counter #(.N_ROI(JET_N_SUB), .N_THR(JET_N_DEF), .W(2)) u_cj2 (
    .hits(jet_hits), .mult(cj2));
  mult_counter #(.N_ROI(N_FCAL_ROI), .N_THR(4), .W(2)) u_fc2 (
    .hits(fcal_hits), .mult(fc2));

  always_comb begin
    if (fwd_mode) word = {fc2, cj2};
    else          word = cj3;
  end
endmodule
