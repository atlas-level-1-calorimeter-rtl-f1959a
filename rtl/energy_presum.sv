// energy_presum: energy pre-summation of one input processor.
//
// For each of N_EL jet elements:
//   * the missing-energy path zeroes elements below the low threshold
//     thr_xy and multiplies the rest by the element's signed 12-bit cosine and
//     sine coefficients (value/1024), giving Ex and Ey contributions in units
//     of 0.25 GeV (product / 256, rounded);
//   * the total-energy path zeroes elements below the high threshold thr_et.
// Elements whose esum_en bit is clear (phi rows outside the core area) are
// left out of both sums.  Ex and Ey are summed and saturated to 14-bit two's
// complement; Et is summed and saturated to 12 bits (4095 GeV).  A saturated
// element (0x3FF) that enters the Et sum forces Et to full scale.
//
// Timing: three register stages (threshold/multiply, sum, output).
// Following the specification: the two thresholds, 12-bit coefficients,
// 0.25 GeV Ex/Ey at 14 bits, 12-bit Et with saturation.  The coefficient
// scale (1/1024), rounding, the two's complement format of Ex/Ey, the enable
// mask and saturation forcing only Et are this design's choices.
module energy_presum
  import jem_pkg::*;
#(
  parameter int unsigned N_EL = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  je_t                      je      [N_EL],
  input  logic signed [COEF_W-1:0] coef_x  [N_EL],
  input  logic signed [COEF_W-1:0] coef_y  [N_EL],
  input  logic [N_EL-1:0]          esum_en,
  input  je_t                      thr_xy,
  input  je_t                      thr_et,
  output logic [ET_W-1:0]          et,
  output logic signed [EXY_W-1:0]  ex,
  output logic signed [EXY_W-1:0]  ey
);
  localparam int unsigned PW  = JE_W + COEF_W + 1;          // signed product
  localparam int unsigned AW  = PW + $clog2(N_EL + 1);      // accumulator
  localparam int unsigned EAW = JE_W + $clog2(N_EL + 1);

  logic signed [PW-1:0]  px [N_EL];
  logic signed [PW-1:0]  py [N_EL];
  logic [JE_W-1:0]       pe [N_EL];
  logic                  psat;

  // stage 1: thresholds and multipliers
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_EL; i++) begin
        px[i] <= '0; py[i] <= '0; pe[i] <= '0;
      end
      psat <= 1'b0;
    end else begin
      psat <= 1'b0;
      for (int i = 0; i < N_EL; i++) begin
        logic signed [PW-1:0] e_s;
        e_s = PW'(signed'({1'b0, je[i]}));
        if (esum_en[i] && je[i] >= thr_xy) begin
          px[i] <= (e_s * PW'(coef_x[i]) + PW'(128)) >>> 8;
          py[i] <= (e_s * PW'(coef_y[i]) + PW'(128)) >>> 8;
        end else begin
          px[i] <= '0;
          py[i] <= '0;
        end
        if (esum_en[i] && je[i] >= thr_et) begin
          pe[i] <= je[i];
          if (je[i] == JE_SAT) psat <= 1'b1;
        end else begin
          pe[i] <= '0;
        end
      end
    end
  end

  // stage 2: adder trees
  logic signed [AW-1:0] sx, sy;
  logic [EAW-1:0]       se;
  logic                 ssat;
  always_ff @(posedge clk) begin
    if (rst) begin
      sx <= '0; sy <= '0; se <= '0; ssat <= 1'b0;
    end else begin
      logic signed [AW-1:0] ax, ay;
      logic [EAW-1:0]       ae;
      ax = '0; ay = '0; ae = '0;
      for (int i = 0; i < N_EL; i++) begin
        ax = ax + AW'(px[i]);
        ay = ay + AW'(py[i]);
        ae = ae + EAW'(pe[i]);
      end
      sx <= ax; sy <= ay; se <= ae; ssat <= psat;
    end
  end

  // stage 3: saturation and output flip-flops
  localparam logic signed [AW-1:0] XY_MAX = AW'((2 ** (EXY_W - 1)) - 1);
  localparam logic signed [AW-1:0] XY_MIN = -AW'(2 ** (EXY_W - 1));
  always_ff @(posedge clk) begin
    if (rst) begin
      et <= '0; ex <= '0; ey <= '0;
    end else begin
      et <= (ssat || se > EAW'((2 ** ET_W) - 1)) ? '1 : se[ET_W-1:0];
      ex <= (sx > XY_MAX) ? XY_MAX[EXY_W-1:0] : (sx < XY_MIN) ? XY_MIN[EXY_W-1:0] : sx[EXY_W-1:0];
      ey <= (sy > XY_MAX) ? XY_MAX[EXY_W-1:0] : (sy < XY_MIN) ? XY_MIN[EXY_W-1:0] : sy[EXY_W-1:0];
    end
  end
endmodule
