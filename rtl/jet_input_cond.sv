// jet_input_cond: conditioning of the 7 x 11 jet element environment in the
// jet processor before the jet algorithm.
//
// 1. Threshold: elements below the VME-programmable threshold are zeroed.
// 2. FCAL mapping: in eta columns flagged in fcal_col (the two outermost
//    columns of the JEMs at the ends of a quadrant), a forward calorimeter
//    tower spans two phi rows.  Its energy is halved (a 1-bit shift) and
//    placed in both rows: a row whose copy_from_below bit is set takes the
//    halved element of the row below (its own input is not cabled); the
//    others take their own halved element.  A saturated element (0x3FF) stays
//    saturated.  The multiplexer settings are VME register bits, as in the
//    specification; their exact layout is this design's.
// Timing: one register stage.
module jet_input_cond
  import jem_pkg::*;
#(
  parameter int unsigned NE = ENV_ETA,
  parameter int unsigned NP = ENV_PHI
) (
  input  logic          clk,
  input  logic          rst,
  input  je_t           din  [NE][NP],
  input  je_t           thr,
  input  logic [NE-1:0] fcal_col,
  input  logic [NP-1:0] copy_from_below,
  output je_t           dout [NE][NP]
);
  function automatic je_t half(input je_t x);
    return (x == JE_SAT) ? JE_SAT : (x >> 1);
  endfunction

  je_t t [NE][NP];
  always_comb begin
    for (int e = 0; e < NE; e++)
      for (int p = 0; p < NP; p++)
        t[e][p] = (din[e][p] < thr) ? '0 : din[e][p];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < NE; e++)
        for (int p = 0; p < NP; p++)
          dout[e][p] <= '0;
    end else begin
      for (int e = 0; e < NE; e++)
        for (int p = 0; p < NP; p++)
          if (!fcal_col[e])                      dout[e][p] <= t[e][p];
          else if (copy_from_below[p] && p > 0)  dout[e][p] <= half(t[e][(p > 0) ? p - 1 : 0]);
          else                                   dout[e][p] <= half(t[e][p]);
    end
  end
endmodule
