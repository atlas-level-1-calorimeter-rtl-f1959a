// ip_channel_sync: input synchronisation of one deserialiser channel.
//
// The 10 data bits from the LVDS deserialiser arrive with an arbitrary phase
// relative to the bunch clock.  They are captured on both clock edges (0 and
// 180 degrees); a VME-set bit chooses which of the two samples is used, and
// the chosen word is retimed to the rising edge.  A programmable-length shift
// register then corrects channel-to-channel skew in whole bunch ticks.  The
// /LOCK link status is taken into a single rising-edge flip-flop and delayed
// with the data so that both stay aligned.
//
// Timing: with delay = 0 the output follows the rising-edge sample by two
// clock cycles (sample, retime/select); every unit of `delay` adds one cycle.
// Following the specification: dual-edge sampling, software phase select,
// whole-tick delay.  The delay range (0..MAX_DELAY-1) and the delay of the
// lock bit along with the data are this design's choices.
module ip_channel_sync #(
  parameter int unsigned W         = 10,
  parameter int unsigned MAX_DELAY = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [W-1:0]                 din,
  input  logic                         lock_n,
  input  logic                         phase_sel,  // 0: rising-edge sample, 1: falling-edge sample
  input  logic [$clog2(MAX_DELAY)-1:0] delay,
  output logic [W-1:0]                 dout,
  output logic                         lock_n_out
);
  logic [W-1:0] s_pos, s_neg;
  logic         lk;
  logic [W:0]   pipe [MAX_DELAY];

  always_ff @(posedge clk) begin
    s_pos <= din;
    lk    <= lock_n;
  end

  always_ff @(negedge clk) s_neg <= din;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < MAX_DELAY; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= {lk, phase_sel ? s_neg : s_pos};
      for (int i = 1; i < MAX_DELAY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign {lock_n_out, dout} = pipe[delay];
endmodule
