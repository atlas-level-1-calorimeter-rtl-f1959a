// je_former: builds one jet element from an electromagnetic and a hadronic
// trigger-tower energy.
//
// The two 9-bit energies are added into a 10-bit jet element.  If either
// input is saturated (0x1FF) the jet element is set to full scale (0x3FF),
// so saturation propagates down the trigger chain as the specification
// requires.  Timing: one register stage.
module je_former
  import jem_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [EN_W-1:0] em,
  input  logic [EN_W-1:0] had,
  output je_t             je
);
  always_ff @(posedge clk) begin
    if (rst) je <= '0;
    else     je <= je_sum(em, had);
  end
endmodule
