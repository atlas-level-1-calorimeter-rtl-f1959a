// je_mux: sends a 10-bit jet element as two 5-bit words at twice the bunch
// clock, least significant half first.
//
// clk2x is phase-aligned with the bunch clock clk (both derived from the
// same DLL).  bc_toggle is a flip-flop in the clk domain that inverts on
// every bunch tick; sampling it on clk2x tells which half of the bunch period
// the next clk2x edge starts.  On the clk2x edge that coincides with the
// bunch clock edge the jet element (still holding the previous tick's value)
// is captured and its low half driven; on the middle edge the high half is
// driven.  The output is an output flip-flop, as the specification requires.
//
// Timing: the element held by the clk register during tick n is on the line
// as low half during the first half of tick n+1 and as high half during its
// second half.
module je_mux
  import jem_pkg::*;
(
  input  logic              clk2x,
  input  logic              bc_toggle,
  input  je_t               je,
  output logic [HALF_W-1:0] dout
);
  logic s;
  je_t  hold;
  logic at_bc_edge;   // next clk2x edge coincides with a bunch clock edge
  assign at_bc_edge = (s == bc_toggle);

  always_ff @(posedge clk2x) begin
    s <= bc_toggle;
    if (at_bc_edge) begin
      hold <= je;
      dout <= je[HALF_W-1:0];
    end else begin
      dout <= hold[JE_W-1:HALF_W];
    end
  end
endmodule
