// l1calo_pkg: types and constants shared by the JEM, CPM and CMX real-time
// path blocks. The backplane numbers (25 lines, 24 data lines, four words per
// bunch crossing, 96-bit payload) and the algorithm sizes (4x8 jet core,
// 8 jet definitions, 4x16 tower core, 16 cluster definitions) follow the
// data-format specification; the struct layouts are this design's own choice.
package l1calo_pkg;

  // Backplane link
  localparam int BP_LINES     = 25;  // 24 data lines + clock/parity line
  localparam int BP_DATA      = 24;
  localparam int WORDS_PER_BC = 4;   // 160 Mbit/s at 40 MHz bunch crossings
  localparam int PAYLOAD_W    = BP_DATA * WORDS_PER_BC;  // 96

  // Jet processor module (JEM)
  localparam int JE_IN_W    = 9;    // EM / hadronic jet element Et
  localparam int JE_W       = 10;   // summed jet element Et, 1 GeV LSB
  localparam int JET_N_DEF  = 8;    // jet definitions (threshold bits)
  localparam int JET_N_SUB  = 8;    // RoI subregions per JEM
  localparam int JET_N_SLOT = 4;    // RoIs detailed in the 160 Mbit/s format

  typedef enum logic [1:0] {
    WIN_2X2 = 2'd0,
    WIN_3X3 = 2'd1,
    WIN_4X4 = 2'd2
  } jet_win_e;

  typedef struct packed {
    jet_win_e          win;   // jet window size
    logic [JE_W-1:0]   thr;   // Et threshold, passes when sum > thr
  } jet_def_t;

  typedef struct packed {
    logic                 present;  // local-maximum core passing any definition
    logic [JET_N_DEF-1:0] hits;     // per-definition threshold bits
    logic [1:0]           fp;       // {phi, eta} offset of core in subregion
    logic [JE_W-1:0]      et_s1;    // jet size 1 Et (2x2)
    logic [JE_W-1:0]      et_s2;    // jet size 2 Et (4x4)
  } jet_roi_t;

  // Cluster processor module (CPM)
  localparam int TT_W       = 8;    // trigger tower Et, 1 GeV LSB
  localparam int CP_N_DEF   = 16;   // cluster definitions (threshold bits)
  localparam int CP_N_SUB   = 16;   // 2x8 subregions of 2x2 towers
  localparam int CP_N_CHIP  = 8;    // CP chips, two subregions each
  localparam int CP_N_SLOT  = 5;    // clusters detailed in the 160 Mbit/s format

  typedef struct packed {
    logic            tau;      // 1: tau/hadron definition (defs 8..15 only)
    logic [TT_W+3:0] clus;     // cluster Et threshold, passes when Et > clus
    logic [TT_W+3:0] em_iso;   // max EM ring sum
    logic [TT_W+3:0] had_iso;  // max hadronic ring sum (tau) / core sum (EM)
  } cp_def_t;

  // Graded isolation levels used to build the 2-bit ei/hi/hv fields.
  typedef struct packed {
    logic [TT_W+3:0]           roi_min;  // lowest cluster Et for an RoI
    logic [2:0][TT_W+3:0]      em_iso;   // EM ring levels
    logic [2:0][TT_W+3:0]      had_iso;  // hadronic ring levels
    logic [2:0][TT_W+1:0]      had_veto; // hadronic core levels
  } cp_roi_cfg_t;

  typedef struct packed {
    logic            present;
    logic [TT_W-1:0] et;   // cluster Et, saturated to 8 bits
    logic [1:0]      fp;   // {phi, eta} offset in subregion
    logic [1:0]      ei;   // EM isolation levels passed
    logic [1:0]      hi;   // hadronic isolation levels passed
    logic [1:0]      hv;   // hadronic veto levels passed (0 for hadronic)
  } cp_roi_t;

  // Odd parity bit: makes the count of ones in {data, parity} odd.
  function automatic logic odd_parity(input logic [PAYLOAD_W-1:0] d);
    return ~(^d);
  endfunction

endpackage
