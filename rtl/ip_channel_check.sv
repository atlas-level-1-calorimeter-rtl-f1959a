// ip_channel_check: error handling for one input channel.
//
// Checks the odd parity bit (bit 0) of the 10-bit deserialiser word against
// the 9 energy bits (bits 9:1), watches the /LOCK status, and applies the
// VME channel mask.  The registered 9-bit energy output is zero when the
// channel is masked, the link is not locked or the parity is wrong.  Parity
// errors and lock losses (rising edges of /LOCK) are counted in saturating
// CNT_W-bit counters that a VME pulse clears.  Masked channels count nothing.
//
// Timing: one register stage (energy and flags valid one cycle after input).
// Following the specification: parity check, zeroing, leading-edge lock-loss
// count, 12-bit saturating counters, mask.  Not counting on masked channels
// is this design's choice.
module ip_channel_check
  import jem_pkg::*;
#(
  parameter int unsigned CNT_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [RAW_W-1:0]  din,
  input  logic              lock_n,
  input  logic              mask,
  input  logic              cnt_clear,
  output logic [EN_W-1:0]   energy,
  output logic              par_err,
  output logic              link_down,
  output logic [CNT_W-1:0]  par_err_cnt,
  output logic [CNT_W-1:0]  lock_loss_cnt
);
  logic lock_n_d;
  logic perr;
  assign perr = (odd_parity9(din[RAW_W-1:1]) != din[0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      energy        <= '0;
      par_err       <= 1'b0;
      link_down     <= 1'b0;
      lock_n_d      <= 1'b0;
      par_err_cnt   <= '0;
      lock_loss_cnt <= '0;
    end else begin
      lock_n_d  <= lock_n;
      link_down <= lock_n;
      par_err   <= perr && !lock_n && !mask;
      energy    <= (mask || lock_n || perr) ? '0 : din[RAW_W-1:1];
      if (cnt_clear) begin
        par_err_cnt   <= '0;
        lock_loss_cnt <= '0;
      end else if (!mask) begin
        if (perr && !lock_n && par_err_cnt != '1)       par_err_cnt   <= par_err_cnt + 1'b1;
        if (lock_n && !lock_n_d && lock_loss_cnt != '1) lock_loss_cnt <= lock_loss_cnt + 1'b1;
      end
    end
  end
endmodule
