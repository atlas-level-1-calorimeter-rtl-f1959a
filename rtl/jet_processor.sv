// jet_processor: jet processor FPGA of the JEM, with the module's RoI
// read-out controller.
//
// Inputs are 77 jet elements sent as 5-bit words at twice the bunch clock:
// 44 from the local input processors (element j = 4*row + eta), 22 from the
// right-hand JEM (its two leftmost eta columns, index 2*row + column) and 11
// from the left-hand JEM (its rightmost column).  je_demux rebuilds them and
// the bunch clock domain latches them into the 7 x 11 environment (eta 0 =
// left neighbour, 1..4 local, 5..6 right neighbour).  jet_input_cond applies
// the threshold and FCAL mapping, jet_algorithm finds and counts jets, and the
// 24 hit bits leave through output flip-flops with an odd parity bit (bit
// 24); the merger output is forced to zero while the TTC is not ready.
//
// RoI readout: the 8 central and 8 FCAL RoI records (11 bits each) form a
// slice of four 44-bit streams (central records 0-3 and 4-7, then FCAL), read
// out one slice per Level-1 accept and serialised with odd parity to 45-bit
// packets.  A second sequencer carries the bunch crossing number (12 bits in a
// 44-bit slice).  The RoI link word is {fcal1, fcal0, bcn, central1,
// central0}; the FCAL bits are held at 0 unless fcal_mode is set.
// A spy memory records the hit output word.
//
// Timing: 11 bunch ticks from the first 5-bit word on the input lines to the
// hit word on the output (2 demultiplexing, 1 latch, 1 conditioning, 3
// algorithm, 1 output, counted from the start of the tick after the low half
// arrives).  Stream and link bit assignments are this design's choices.
module jet_processor
  import jem_pkg::*;
#(
  parameter int unsigned LATENCY    = 48,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned GAP        = 20
) (
  input  logic              clk,
  input  logic              clk2x,
  input  logic              rst,
  input  logic              bc_toggle,
  input  logic [HALF_W-1:0] je_local   [N_JE],
  input  logic [HALF_W-1:0] fio_from_right [2*ENV_PHI],
  input  logic [HALF_W-1:0] fio_from_left  [ENV_PHI],
  // configuration
  input  je_t               thr_jet,
  input  logic [ENV_ETA-1:0] fcal_col,
  input  logic [ENV_PHI-1:0] copy_from_below,
  input  logic              fcal_mode,
  input  jet_def_t          defs      [8],
  input  jet_def_t          fcal_defs [4],
  // TTC
  input  logic              ttc_ready,
  input  logic              l1a,
  input  logic              bcnt_res,
  input  logic              sync_reset,
  input  logic [5:0]        ro_offset,
  // outputs
  output logic [MERGE_W-1:0] hits_out,
  output logic [4:0]        roi_link,
  output logic              roi_dav,
  // spy
  input  logic              spy_en,
  input  logic              spy_rd,
  input  logic              spy_ptr_reset,
  output logic [MERGE_W-1:0] spy_rdata
);
  je_t env_fast [ENV_ETA][ENV_PHI];
  je_t env      [ENV_ETA][ENV_PHI];
  je_t cond     [ENV_ETA][ENV_PHI];

  for (genvar p = 0; p < ENV_PHI; p++) begin : g_row
    je_demux u_l (.clk2x, .bc_toggle, .din(fio_from_left[p]), .je(env_fast[0][p]));
    for (genvar e = 0; e < N_ETA_LOCAL; e++) begin : g_loc
      je_demux u_d (.clk2x, .bc_toggle, .din(je_local[4*p + e]), .je(env_fast[1+e][p]));
    end
    for (genvar k = 0; k < 2; k++) begin : g_r
      je_demux u_r (.clk2x, .bc_toggle, .din(fio_from_right[2*p + k]), .je(env_fast[5+k][p]));
    end
  end

  always_ff @(posedge clk) env <= env_fast;

  jet_input_cond u_cond (
    .clk, .rst, .din(env), .thr(thr_jet), .fcal_col, .copy_from_below, .dout(cond)
  );

  logic [23:0] hits;
  roi_t        roi_c [8];
  roi_t        roi_f [8];
  jet_algorithm #(.N_THR(8), .N_FCAL_THR(4)) u_alg (
    .clk, .rst, .je(cond), .fcal_col, .fcal_mode, .defs, .fcal_defs,
    .hits, .roi_c, .roi_f
  );

  always_ff @(posedge clk) begin
    if (rst || !ttc_ready) hits_out <= '0;
    else                   hits_out <= {~(^hits), hits};
  end

  // RoI readout
  logic [8*ROI_W-1:0] roi_c_bits, roi_f_bits;
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      roi_c_bits[k*ROI_W +: ROI_W] = roi_c[k];
      roi_f_bits[k*ROI_W +: ROI_W] = roi_f[k];
    end
  end

  logic        read_req, rr_first, rr_last;
  logic [BCN_W-1:0] bcn;
  logic [3:0]  r_bits;
  logic        r_valid;
  logic        b_bit, b_valid;
  logic [4:0]  lk;

  readout_controller #(.N_IN(5)) u_roc (
    .clk, .rst, .l1a, .bcnt_res, .ttc_ready, .offset(ro_offset), .n_slices(3'd1),
    .read_req, .rr_first, .rr_last, .bcn,
    .stream({r_bits[3] & fcal_mode, r_bits[2] & fcal_mode, b_bit, r_bits[1:0]}),
    .stream_valid({{2{r_valid & fcal_mode}}, b_valid, {2{r_valid}}}),
    .link_data(lk), .link_dav(roi_dav)
  );
  assign roi_link = lk;

  readout_sequencer #(
    .N_STREAM(4), .SLICE_BITS(4*ROI_W), .LATENCY(LATENCY),
    .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP), .TAG_W(0)
  ) u_rs_roi (
    .clk, .rst, .din({roi_f_bits, roi_c_bits}), .read_req, .rr_first, .rr_last,
    .sout(r_bits), .sout_valid(r_valid), .fifo_count(), .overflow()
  );

  readout_sequencer #(
    .N_STREAM(1), .SLICE_BITS(4*ROI_W), .LATENCY(LATENCY),
    .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP), .TAG_W(0)
  ) u_rs_bcn (
    .clk, .rst, .din((4*ROI_W)'(bcn)), .read_req, .rr_first, .rr_last,
    .sout(b_bit), .sout_valid(b_valid), .fifo_count(), .overflow()
  );

  spy_mem #(.DEPTH(256), .WIDTH(MERGE_W)) u_spy (
    .clk, .rst, .enable(spy_en), .sync_reset, .rt_data(hits_out),
    .vme_rd(spy_rd), .vme_ptr_reset(spy_ptr_reset), .vme_rdata(spy_rdata)
  );
endmodule
