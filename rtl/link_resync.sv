// link_resync: re-synchronises a readout link word from the bunch clock to
// the local crystal clock that drives the link chip.
//
// The two clocks have nominally equal frequency (40.08 MHz bunch clock,
// 40.000 MHz crystal) but are unrelated in phase and differ slightly in
// rate.  Every bunch tick writes one word {dav, data} into a small
// dual-clock FIFO (gray-coded pointers, two-flip-flop synchronisers); every
// crystal tick reads one.  The FIFO is elastic, and it adjusts its fill
// level only with idle words (dav = 0), so a packet of valid words is never
// split by an inserted fill frame, which the receiver would take for the end
// of the packet:
//   * write side: an idle word is dropped while the fill level seen there is
//     at or above HI;
//   * read side: while the fill level seen there is below LO and the next
//     word is idle, an idle word is sent without reading (fill frame).
// Between packets the level thus settles in [LO, HI); a packet can be as long
// as the slack divided by the rate difference (at 0.2 % and DEPTH 16 far more
// than the longest packet of 5 x 67 words).  An empty FIFO sends fill frames;
// a full one drops the word and sets the sticky `overflow` flag.
//
// Interface: wclk side (bunch clock) din/din_dav, synchronous reset wrst;
// rclk side (crystal clock) dout/dout_dav, registered.  The read side takes
// its reset from wrst through a two-flip-flop synchroniser.
// Timing: a word reaches dout after about LO..HI crystal ticks plus 3 ticks
// of synchronisation.  The re-synchronisation itself follows the
// specification; the elastic-buffer scheme, depth and levels are this
// design's choices.
module link_resync #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned LO    = DEPTH / 4,
  parameter int unsigned HI    = DEPTH / 2 + DEPTH / 4
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic [W-1:0] din,
  input  logic         din_dav,
  input  logic         rclk,
  output logic [W-1:0] dout,
  output logic         dout_dav,
  output logic         overflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;

  function automatic logic [PW-1:0] bin2gray(input logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [PW-1:0] gray2bin(input logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [W:0] mem [DEPTH];

  // Pointers crossing between the two domains (gray code).
  logic [PW-1:0] wgray, rgray_r;

  // ---------------- write side (bunch clock) ----------------
  logic [PW-1:0] wbin;
  logic [PW-1:0] rgray_w1, rgray_w2;
  logic [PW-1:0] level_w;
  logic          wfull, wskip;

  assign level_w = wbin - gray2bin(rgray_w2);
  assign wfull   = (level_w == PW'(DEPTH));
  assign wskip   = (!din_dav && level_w >= PW'(HI)) || wfull;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray_r;
      rgray_w2 <= rgray_w1;
      if (!wskip) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
      if (wfull && din_dav) overflow <= 1'b1;
    end
  end
  always_ff @(posedge wclk) if (!wrst && !wskip) mem[wbin[AW-1:0]] <= {din_dav, din};

  // ---------------- read side (crystal clock) ----------------
  logic [1:0]    rrst_s;
  logic          rrst;
  logic [PW-1:0] rbin;
  logic [PW-1:0] wgray_r1, wgray_r2;
  logic [PW-1:0] level_r;
  logic [W:0]    head;
  logic          rempty, rstall;

  always_ff @(posedge rclk) rrst_s <= {rrst_s[0], wrst};
  assign rrst = rrst_s[1];

  assign level_r = gray2bin(wgray_r2) - rbin;
  assign rempty  = (level_r == '0);
  assign head    = mem[rbin[AW-1:0]];
  assign rstall  = rempty || (!head[W] && level_r < PW'(LO));

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray_r <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      dout <= '0; dout_dav <= 1'b0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rstall) begin
        dout <= '0; dout_dav <= 1'b0;
      end else begin
        dout     <= head[W-1:0];
        dout_dav <= head[W];
        rbin     <= rbin + 1'b1;
        rgray_r  <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
