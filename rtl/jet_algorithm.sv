// jet_algorithm: sliding-window jet finder of the JEM.
//
// Input: 7 (eta) x 11 (phi) jet elements.  Eta column 0 comes from the
// left-hand JEM, 1..4 are local, 5..6 come from the right-hand JEM; phi row 0
// and rows 9..10 are overlap from neighbouring quadrants.  The 4 x 8 core is
// eta 1..4, phi 1..8.
//
// Stage 1 (sums): 2x2 sums at 6x10 corners, 3x3 at 5x9, 4x4 at 4x8, each with
// a flag that it contains a saturated element (0x3FF).
// Stage 2 (maxima and thresholds): each of the 32 core 2x2 clusters is a
// local maximum if it is greater than its 8 neighbours in the 6x10 array,
// strictly for the neighbours at lower eta (and at equal eta, lower phi) and
// greater-or-equal for the others; this asymmetric rule gives at most one
// maximum in each 2x2 subregion of the core.  The core holds 8 subregions
// (2 in eta x 4 in phi); for each the maximum's 2-bit position
// {phi offset, eta offset}, its clusters and flags are selected: the 2x2
// cluster itself, the 4x4 cluster centred on it and the four 3x3 clusters
// that contain it.  Each jet definition (threshold + cluster size) passes if
// the definition is enabled (threshold below 0x3FF) and the selected cluster
// is saturated or exceeds the threshold; for 3x3, one of the four clusters
// suffices.  If the 2x2 cluster contains an element of an FCAL column and
// fcal_mode is set, the 4 FCAL definitions are tested instead of the 8
// central ones.
// Stage 3 (multiplicities): central mode: eight 3-bit counts, saturating at
// 7, hits = {m7,...,m0}.  FCAL mode: eight 2-bit central counts and four
// 2-bit FCAL counts, saturating at 3, hits = {f3..f0, c7..c0}.
//
// RoI outputs (one 11-bit record per subregion: saturation flag, 8 threshold
// bits, position) are registered alongside the hits, split into a central
// and an FCAL set.  Timing: hits and RoIs are valid 3 ticks after the input.
// The neighbour-comparison rule, the position code and the saturation flag
// of an RoI (any saturated element in its 4x4 cluster) are this design's
// choices where the specification leaves them open.
module jet_algorithm
  import jem_pkg::*;
#(
  parameter int unsigned N_THR      = 8,
  parameter int unsigned N_FCAL_THR = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  je_t           je  [ENV_ETA][ENV_PHI],
  input  logic [ENV_ETA-1:0] fcal_col,
  input  logic          fcal_mode,
  input  jet_def_t      defs      [N_THR],
  input  jet_def_t      fcal_defs [N_FCAL_THR],
  output logic [23:0]   hits,
  output roi_t          roi_c [8],
  output roi_t          roi_f [8]
);
  localparam int unsigned S2W = JE_W + 2;
  localparam int unsigned S3W = JE_W + 4;
  localparam int unsigned S4W = JE_W + 4;

  // ---------------- stage 1: cluster sums ----------------
  logic [S2W-1:0] s2 [6][10];
  logic           f2 [6][10];
  logic [S3W-1:0] s3 [5][9];
  logic           f3 [5][9];
  logic [S4W-1:0] s4 [4][8];
  logic           f4 [4][8];

  always_ff @(posedge clk) begin
    for (int e = 0; e < 6; e++)
      for (int p = 0; p < 10; p++) begin
        logic [S2W-1:0] a; logic f;
        a = '0; f = 1'b0;
        for (int i = 0; i < 2; i++)
          for (int k = 0; k < 2; k++) begin
            a = a + S2W'(je[e+i][p+k]);
            f = f | (je[e+i][p+k] == JE_SAT);
          end
        s2[e][p] <= a; f2[e][p] <= f;
      end
    for (int e = 0; e < 5; e++)
      for (int p = 0; p < 9; p++) begin
        logic [S3W-1:0] a; logic f;
        a = '0; f = 1'b0;
        for (int i = 0; i < 3; i++)
          for (int k = 0; k < 3; k++) begin
            a = a + S3W'(je[e+i][p+k]);
            f = f | (je[e+i][p+k] == JE_SAT);
          end
        s3[e][p] <= a; f3[e][p] <= f;
      end
    for (int e = 0; e < 4; e++)
      for (int p = 0; p < 8; p++) begin
        logic [S4W-1:0] a; logic f;
        a = '0; f = 1'b0;
        for (int i = 0; i < 4; i++)
          for (int k = 0; k < 4; k++) begin
            a = a + S4W'(je[e+i][p+k]);
            f = f | (je[e+i][p+k] == JE_SAT);
          end
        s4[e][p] <= a; f4[e][p] <= f;
      end
  end

  // fcal_col and fcal_mode aligned with the stage 1 registers
  logic [ENV_ETA-1:0] fcal_col_r;
  logic               fcal_mode_r;
  always_ff @(posedge clk) begin
    fcal_col_r  <= fcal_col;
    fcal_mode_r <= fcal_mode;
  end

  // ---------------- stage 2: local maxima and thresholds ----------------
  function automatic logic is_local_max(input int e, input int p,
                                        input logic [S2W-1:0] s [6][10]);
    logic r;
    r = 1'b1;
    for (int de = -1; de <= 1; de++)
      for (int dp = -1; dp <= 1; dp++) begin
        if (de == 0 && dp == 0) continue;
        if (de < 0 || (de == 0 && dp < 0)) r = r & (s[e][p] >  s[e+de][p+dp]);
        else                               r = r & (s[e][p] >= s[e+de][p+dp]);
      end
    return r;
  endfunction

  logic [7:0]  pass_r  [8];   // threshold bits per subregion
  logic        found_r [8];
  logic        isf_r   [8];
  logic        sat_r   [8];
  logic [1:0]  pos_r   [8];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 8; k++) begin
        pass_r[k] <= '0; found_r[k] <= 1'b0; isf_r[k] <= 1'b0; sat_r[k] <= 1'b0; pos_r[k] <= '0;
      end
    end else begin
      for (int k = 0; k < 8; k++) begin
        int se, sp, e, p;
        logic       found, isf, sat;
        logic [1:0] pos;
        logic [7:0] pass;
        se = k % 2;
        sp = k / 2;
        found = 1'b0; pos = '0; e = 1 + 2*se; p = 1 + 2*sp;
        for (int q = 3; q >= 0; q--) begin
          int ee, pp;
          ee = 1 + 2*se + (q % 2);
          pp = 1 + 2*sp + (q / 2);
          if (is_local_max(ee, pp, s2)) begin
            found = 1'b1; pos = 2'(q); e = ee; p = pp;
          end
        end
        isf  = fcal_mode_r && (fcal_col_r[e] || fcal_col_r[e+1]);
        sat  = f4[e-1][p-1];
        pass = '0;
        for (int d = 0; d < 8; d++) begin
          jet_def_t df;
          logic     ok;
          if (isf) begin
            if (d >= N_FCAL_THR) continue;
            df = fcal_defs[d];
          end else begin
            if (d >= N_THR) continue;
            df = defs[d];
          end
          ok = 1'b0;
          case (df.size)
            CL_2X2: ok = f2[e][p] || (s2[e][p] > S2W'(df.thr));
            CL_3X3: begin
              for (int i = 0; i < 2; i++)
                for (int j = 0; j < 2; j++)
                  ok = ok || f3[e-1+i][p-1+j] || (s3[e-1+i][p-1+j] > S3W'(df.thr));
            end
            CL_4X4: ok = f4[e-1][p-1] || (s4[e-1][p-1] > S4W'(df.thr));
            default: ok = 1'b0;
          endcase
          pass[d] = found && (df.thr != JE_SAT) && ok;
        end
        pass_r[k]  <= pass;
        found_r[k] <= found;
        isf_r[k]   <= isf;
        sat_r[k]   <= found && sat;
        pos_r[k]   <= pos;
      end
    end
  end

  // ---------------- stage 3: multiplicities and RoI records ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      hits <= '0;
      for (int k = 0; k < 8; k++) begin roi_c[k] <= '0; roi_f[k] <= '0; end
    end else begin
      logic [3:0] cc [8];
      logic [3:0] fc [4];
      for (int d = 0; d < 8; d++) cc[d] = '0;
      for (int d = 0; d < 4; d++) fc[d] = '0;
      for (int k = 0; k < 8; k++) begin
        for (int d = 0; d < 8; d++)
          if (pass_r[k][d]) begin
            if (isf_r[k]) begin
              if (d < 4) fc[d] = fc[d] + 1'b1;
            end else begin
              cc[d] = cc[d] + 1'b1;
            end
          end
      end
      if (!fcal_mode_r) begin
        for (int d = 0; d < 8; d++) hits[3*d +: 3] <= (cc[d] > 4'd7) ? 3'd7 : cc[d][2:0];
      end else begin
        for (int d = 0; d < 8; d++) hits[2*d +: 2]      <= (cc[d] > 4'd3) ? 2'd3 : cc[d][1:0];
        for (int d = 0; d < 4; d++) hits[16 + 2*d +: 2] <= (fc[d] > 4'd3) ? 2'd3 : fc[d][1:0];
      end
      for (int k = 0; k < 8; k++) begin
        roi_t r;
        r.sat      = sat_r[k];
        r.thr_hits = pass_r[k];
        r.pos      = found_r[k] ? pos_r[k] : 2'b00;
        roi_c[k] <= (found_r[k] && !isf_r[k]) ? r : '0;
        roi_f[k] <= (found_r[k] &&  isf_r[k]) ? r : '0;
      end
    end
  end
endmodule
