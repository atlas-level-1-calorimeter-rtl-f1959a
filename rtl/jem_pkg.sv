// jem_pkg: constants, types and small functions shared by the Jet/Energy
// Module (JEM) RTL.
//
// The JEM sees a trigger space of 11 phi rows (8 core + 3 overlap) by 4 eta
// columns of 0.2 x 0.2 "jet elements" (JE).  Each JE is the sum of one
// electromagnetic and one hadronic deserialiser channel, so the module has
// 88 input channels.  The jet processor works on a 7 (eta) x 11 (phi)
// environment: one eta column from the left neighbour, the four local columns
// and two columns from the right neighbour.
//
// Widths follow the specification: 10-bit deserialiser words (9-bit energy +
// odd parity), 10-bit jet elements saturating at 0x3FF, 12/14/14-bit energy
// pre-sums, 25-bit merger words (24 bits + odd parity) and 67-bit readout
// slices (66 bits + odd parity).  The register map below is this design's own.
package jem_pkg;

  // ---- trigger space -----------------------------------------------------
  localparam int unsigned N_ETA_LOCAL = 4;   // local eta columns per JEM
  localparam int unsigned N_PHI_ROWS  = 11;  // phi rows (8 core + 3 overlap)
  localparam int unsigned N_JE        = N_ETA_LOCAL * N_PHI_ROWS; // 44
  localparam int unsigned N_CH        = 2 * N_JE;                 // 88
  localparam int unsigned ENV_ETA     = 7;   // 1 left + 4 local + 2 right
  localparam int unsigned ENV_PHI     = 11;
  localparam int unsigned N_IP        = 4;   // input processors R,S,T,U

  // ---- data widths ------------------------------------------------------
  localparam int unsigned RAW_W   = 10;  // 9 data bits + odd parity (bit 0)
  localparam int unsigned EN_W    = 9;   // em or had energy
  localparam int unsigned JE_W    = 10;  // jet element
  localparam int unsigned HALF_W  = 5;   // FIO / jet processor word at 2x clock
  localparam int unsigned ET_W    = 12;  // pre-summed Et (1 GeV)
  localparam int unsigned EXY_W   = 14;  // pre-summed Ex/Ey (0.25 GeV)
  localparam int unsigned COEF_W  = 12;  // Ex/Ey coefficient
  localparam int unsigned MERGE_W = 25;  // merger word incl. parity
  localparam int unsigned SLICE_W = 66;  // readout stream bits per slice (+1 parity)
  localparam int unsigned BCN_W   = 12;  // bunch counter

  localparam logic [EN_W-1:0] EN_SAT = '1;   // 0x1FF
  localparam logic [JE_W-1:0] JE_SAT = '1;   // 0x3FF

  typedef logic [JE_W-1:0] je_t;

  // Cluster sizes selectable per jet definition
  typedef enum logic [1:0] {
    CL_2X2 = 2'd0,
    CL_3X3 = 2'd1,
    CL_4X4 = 2'd2
  } cluster_size_e;

  typedef struct packed {
    cluster_size_e size;
    logic [JE_W-1:0] thr;   // 0x3FF disables the definition
  } jet_def_t;

  // One RoI record per 2x2 subregion: 2 position bits, 8 threshold bits,
  // 1 saturation bit (11 bits).
  typedef struct packed {
    logic       sat;
    logic [7:0] thr_hits;
    logic [1:0] pos;
  } roi_t;

  localparam int unsigned ROI_W = $bits(roi_t);

  // ---- register map (word addresses of the 16-bit VME registers) --------
  localparam int unsigned REG_AW        = 11;
  localparam logic [REG_AW-1:0] RA_CHCTRL     = 11'h000; // 88: [0] phase, [4:1] delay, [5] mask
  localparam logic [REG_AW-1:0] RA_COEF_X     = 11'h060; // 44: Ex coefficient
  localparam logic [REG_AW-1:0] RA_COEF_Y     = 11'h090; // 44: Ey coefficient
  localparam logic [REG_AW-1:0] RA_THR_XY     = 11'h0C0; // low threshold (Ex/Ey path)
  localparam logic [REG_AW-1:0] RA_THR_ET     = 11'h0C1; // high threshold (Et path)
  localparam logic [REG_AW-1:0] RA_THR_JET    = 11'h0C2; // jet processor input threshold
  localparam logic [REG_AW-1:0] RA_ESUM_EN    = 11'h0C4; // 3 words: per-JE energy enable, 16 per word
  localparam logic [REG_AW-1:0] RA_JETDEF     = 11'h0D0; // 12: [9:0] threshold, [11:10] size
  localparam logic [REG_AW-1:0] RA_FCAL_COL   = 11'h0E0; // [6:0] FCAL eta columns
  localparam logic [REG_AW-1:0] RA_FCAL_COPY  = 11'h0E1; // [10:0] phi rows fed from the row below
  localparam logic [REG_AW-1:0] RA_FCAL_MODE  = 11'h0E2; // [0] FCAL multiplicity format
  localparam logic [REG_AW-1:0] RA_RO_OFFSET  = 11'h0F0; // [5:0] ReadRequest offset
  localparam logic [REG_AW-1:0] RA_RO_SLICES  = 11'h0F1; // [2:0] DAQ slices per L1A (1..5)
  localparam logic [REG_AW-1:0] RA_DIAG       = 11'h0F2; // [0] playback [1] spy [2] VME ptr reset (self-clearing)
  localparam logic [REG_AW-1:0] RA_STATUS     = 11'h0F3; // read: [0] TTC ok echo, [1] any link down
  localparam logic [REG_AW-1:0] RA_ERRCNT     = 11'h100; // 88 parity error counters, 88 lock-loss counters
  localparam logic [REG_AW-1:0] RA_PLAYBACK   = 11'h200; // 88 playback write ports
  localparam logic [REG_AW-1:0] RA_SPY_IP     = 11'h300; // 88 input spy read ports
  localparam logic [REG_AW-1:0] RA_SPY_SUM    = 11'h360; // sum spy: low, high (read of high advances)
  localparam logic [REG_AW-1:0] RA_SPY_JET    = 11'h362; // jet spy: low, high

  // ---- functions ----------------------------------------------------------
  function automatic logic odd_parity9(input logic [EN_W-1:0] d);
    return ~(^d);
  endfunction

  // Saturating add of two 9-bit energies into a 10-bit jet element.
  function automatic je_t je_sum(input logic [EN_W-1:0] em, input logic [EN_W-1:0] had);
    if (em == EN_SAT || had == EN_SAT) return JE_SAT;
    return JE_W'(em) + JE_W'(had);
  endfunction

endpackage
