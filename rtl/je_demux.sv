// je_demux: receives a jet element sent by je_mux as two 5-bit words at twice
// the bunch clock and rebuilds the 10-bit element.
//
// Every clk2x edge latches the line into an input flip-flop.  On the edge
// that coincides with the bunch clock the low half (received during the
// first half of the previous tick) is kept; on the following middle edge the
// high half joins it and the full word is stored.  The word is therefore
// stable across the next bunch clock edge, where the clk domain takes it.
// bc_toggle has the same meaning as in je_mux.
//
// Timing: a word whose low half is on the line during the first half of
// tick n is in `je` from the middle of tick n+1 until the middle of tick
// n+2; a clk register takes it at the start of tick n+2.
module je_demux
  import jem_pkg::*;
(
  input  logic              clk2x,
  input  logic              bc_toggle,
  input  logic [HALF_W-1:0] din,
  output je_t               je
);
  logic              s;
  logic [HALF_W-1:0] r, lo;
  logic              at_bc_edge;
  assign at_bc_edge = (s == bc_toggle);

  always_ff @(posedge clk2x) begin
    s <= bc_toggle;
    r <= din;
    if (at_bc_edge) lo <= r;
    else            je <= {r, lo};
  end
endmodule
