// cpm_fmt160: the 160 Mbit/s CPM-to-CMX cluster format. Sixteen presence bits
// (1L, 1R, ... 8R: subregion s in bit s) and up to five clusters, each with an
// 8-bit Et, a 2-bit fine position and 2-bit EM isolation (ei), hadronic
// isolation (hi) and hadronic veto (hv) fields, fill the 96-bit payload:
//   word 0: presence 15..0, {fp1,hv1,hi1,ei1} 23..16
//   word 1: Et1 7..0, Et2 15..8, {fp2,hv2,hi2,ei2} 23..16
//   word 2: Et3 7..0, Et4 15..8, {fp3,hv3,hi3,ei3} 23..16
//   word 3: Et5 7..0, {fp4,hv4,hi4,ei4} 15..8, {fp5,hv5,hi5,ei5} 23..16
// with payload bit n on word n/24, line n%24, the first listed field at the
// lowest bits. The word layout is the specification's; the bit order inside
// a word is this design's. With HADRONIC set the link carries hadronic
// clusters and the hv fields are sent as zero, as the specification asks.
// Cluster slots are the first five present subregions in index order; further
// clusters keep only their presence bit and raise overflow (design choice).
// Combinational.
module cpm_fmt160
  import l1calo_pkg::*;
#(
  parameter bit HADRONIC = 1'b0
) (
  input  cp_roi_t [CP_N_SUB-1:0] roi,
  output logic [PAYLOAD_W-1:0]   payload,
  output logic                   overflow
);
  logic [CP_N_SUB-1:0]        presence;
  logic [CP_N_SLOT-1:0][7:0]  et;
  logic [CP_N_SLOT-1:0][7:0]  info;   // {fp, hv, hi, ei}
  logic [3:0][BP_DATA-1:0]    w;

  always_comb begin
    automatic int n = 0;
    et       = '0;
    info     = '0;
    overflow = 1'b0;
    for (int s = 0; s < CP_N_SUB; s++) begin
      presence[s] = roi[s].present;
      if (roi[s].present) begin
        if (n < CP_N_SLOT) begin
          et[n]   = roi[s].et;
          info[n] = {roi[s].fp, HADRONIC ? 2'b00 : roi[s].hv, roi[s].hi, roi[s].ei};
        end else begin
          overflow = 1'b1;
        end
        n++;
      end
    end
    w[0]    = {info[0], presence};
    w[1]    = {info[1], et[1], et[0]};
    w[2]    = {info[2], et[3], et[2]};
    w[3]    = {info[4], info[3], et[4]};
    payload = w;
  end
endmodule
