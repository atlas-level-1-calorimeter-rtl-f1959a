// readout_controller: read-out controller (ROC).
//
// ReadRequest generation: a Level-1 accept (l1a) is delayed by a programmable
// offset of 0..63 bunch ticks; ReadRequest (read_req) is then asserted for
// n_slices consecutive ticks (1..5; 0 counts as 1, more than 5 as 5).  The
// first and last ticks are marked by rr_first and rr_last so that the readout
// sequencers can tag slices and close packets.  An L1A whose delayed pulse
// arrives while a request is still running restarts the request.
//
// Bunch counter: a BCN_W-bit counter of bunch ticks, cleared by the TTC
// bunch counter reset (bcnt_res).  It is the bunch crossing identifier that
// the module records with its readout data.
//
// Link word: the single-bit streams of the readout sequencers (all started
// by the same ReadRequest, hence aligned) are collected into a parallel word
// for the link chip.  dav (data available) is high when any stream carries
// valid data; otherwise the word is forced to zero and the link chip sends
// fill frames.  When the TTC is not ready the link is disabled (dav low).
//
// Timing: read_req rises offset+2 ticks after the L1A tick.  The link word
// is registered (one tick).  The re-synchronisation of the link word to the
// local crystal clock of the link chip follows in link_resync.
module readout_controller
  import jem_pkg::*;
#(
  parameter int unsigned N_IN       = 16,
  parameter int unsigned MAX_SLICES = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              l1a,
  input  logic              bcnt_res,
  input  logic              ttc_ready,
  input  logic [5:0]        offset,
  input  logic [2:0]        n_slices,
  output logic              read_req,
  output logic              rr_first,
  output logic              rr_last,
  output logic [BCN_W-1:0]  bcn,
  input  logic [N_IN-1:0]   stream,
  input  logic [N_IN-1:0]   stream_valid,
  output logic [N_IN-1:0]   link_data,
  output logic              link_dav
);
  logic [63:0] l1a_sr;
  logic        fire;
  logic [2:0]  cnt;
  logic [2:0]  nsl;

  assign nsl  = (n_slices == 3'd0) ? 3'd1 :
                (n_slices > 3'(MAX_SLICES)) ? 3'(MAX_SLICES) : n_slices;
  assign fire = l1a_sr[offset];

  always_ff @(posedge clk) begin
    if (rst) begin
      l1a_sr   <= '0;
      cnt      <= '0;
      read_req <= 1'b0;
      rr_first <= 1'b0;
      rr_last  <= 1'b0;
      bcn      <= '0;
    end else begin
      l1a_sr <= {l1a_sr[62:0], l1a};
      bcn    <= bcnt_res ? '0 : bcn + 1'b1;
      if (fire) begin
        read_req <= 1'b1;
        rr_first <= 1'b1;
        rr_last  <= (nsl == 3'd1);
        cnt      <= nsl - 3'd1;
      end else if (cnt != 3'd0) begin
        read_req <= 1'b1;
        rr_first <= 1'b0;
        rr_last  <= (cnt == 3'd1);
        cnt      <= cnt - 3'd1;
      end else begin
        read_req <= 1'b0;
        rr_first <= 1'b0;
        rr_last  <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      link_data <= '0;
      link_dav  <= 1'b0;
    end else begin
      link_dav  <= ttc_ready && (|stream_valid);
      link_data <= (ttc_ready && (|stream_valid)) ? (stream & stream_valid) : '0;
    end
  end

  // rr_first and rr_last only ever mark ticks of an active request
  a_rr_marks: assert property (@(posedge clk) disable iff (rst) (rr_first || rr_last) |-> read_req);
endmodule
