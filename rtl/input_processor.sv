// input_processor: one input processor FPGA of the JEM (daughter modules
// R, S, T with 3 phi rows; U with 2).
//
// Each phi row holds 4 jet elements (eta 0..3), each made of an
// electromagnetic and a hadronic channel: channel 2*j is em and 2*j+1 is had
// of jet element j = 4*row + eta, giving 8*N_PHI channels.  Per channel:
//   ip_channel_sync  - dual-edge sampling, phase select, whole-tick delay
//   playback_mem     - replaces the synchronised word (odd parity regenerated,
//                      link marked locked) while playback mode is on
//   spy_mem          - records the 10-bit word after the playback point
//   ip_channel_check - parity/lock check, mask, error counters
// Then per jet element:
//   je_former        - em + had with saturation
//   je_mux           - 5-bit words at twice the bunch clock to the jet
//                      processor; further output flip-flops carry copies of
//                      eta 0 and 1 to the left-hand JEM and of eta 3 to the
//                      right-hand JEM (backplane fan-out)
// and energy_presum forms the 12/14/14-bit Et/Ex/Ey pre-sums.
//
// DAQ readout: the synchronised 10 data bits and the link status of every
// channel (11 bits) form the slice; 6 channels fill one 66-bit stream, so R/S/T
// produce 4 streams and U 3 (unused bits zero).
//
// Timing (delay setting 0): a deserialiser word reaches the jet element
// register 5 ticks after it is sampled, the 5-bit line one tick later, and
// the energy pre-sums 3 ticks after the jet element.  Recording the
// synchronised rather than raw data in the DAQ slice and the spy is a choice
// of this design.
module input_processor
  import jem_pkg::*;
#(
  parameter int unsigned N_PHI      = 3,
  parameter int unsigned LATENCY    = 48,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned GAP        = 20,
  localparam int unsigned NJ  = 4 * N_PHI,
  localparam int unsigned NC  = 2 * NJ,
  localparam int unsigned NS  = (NC * (RAW_W + 1) + SLICE_W - 1) / SLICE_W
) (
  input  logic                     clk,
  input  logic                     clk2x,
  input  logic                     rst,
  input  logic                     bc_toggle,
  // deserialiser inputs
  input  logic [RAW_W-1:0]         din      [NC],
  input  logic                     lock_n   [NC],
  // channel control
  input  logic                     phase_sel[NC],
  input  logic [3:0]               delay    [NC],
  input  logic                     mask     [NC],
  input  logic                     cnt_clear,
  output logic [11:0]              par_err_cnt  [NC],
  output logic [11:0]              lock_loss_cnt[NC],
  output logic [NC-1:0]            link_down,
  // energy configuration
  input  logic signed [COEF_W-1:0] coef_x [NJ],
  input  logic signed [COEF_W-1:0] coef_y [NJ],
  input  logic [NJ-1:0]            esum_en,
  input  je_t                      thr_xy,
  input  je_t                      thr_et,
  // diagnostics
  input  logic                     playback_en,
  input  logic                     spy_en,
  input  logic                     sync_reset,
  input  logic                     vme_ptr_reset,
  input  logic [NC-1:0]            pb_we,
  input  logic [EN_W-1:0]          pb_wdata,
  input  logic [NC-1:0]            spy_rd,
  output logic [RAW_W-1:0]         spy_rdata [NC],
  // real-time outputs
  output logic [HALF_W-1:0]        je_out    [NJ],
  output logic [HALF_W-1:0]        fio_left  [2*N_PHI],
  output logic [HALF_W-1:0]        fio_right [N_PHI],
  output logic [ET_W-1:0]          et,
  output logic signed [EXY_W-1:0]  ex,
  output logic signed [EXY_W-1:0]  ey,
  // readout
  input  logic                     read_req,
  input  logic                     rr_first,
  input  logic                     rr_last,
  output logic [NS-1:0]            daq_stream,
  output logic                     daq_valid
);
  logic [RAW_W-1:0] sdat [NC];
  logic             slock[NC];
  logic [RAW_W-1:0] cdat [NC];
  logic             clock_n[NC];
  logic [EN_W-1:0]  pbd  [NC];
  logic [EN_W-1:0]  energy[NC];
  je_t              je   [NJ];
  logic [NC*(RAW_W+1)-1:0] slice;

  for (genvar c = 0; c < NC; c++) begin : g_ch
    ip_channel_sync #(.W(RAW_W), .MAX_DELAY(16)) u_sync (
      .clk, .rst, .din(din[c]), .lock_n(lock_n[c]), .phase_sel(phase_sel[c]),
      .delay(delay[c]), .dout(sdat[c]), .lock_n_out(slock[c])
    );
    playback_mem #(.DEPTH(256), .WIDTH(EN_W)) u_pb (
      .clk, .rst, .vme_we(pb_we[c]), .vme_wdata(pb_wdata), .vme_ptr_reset,
      .enable(playback_en), .sync_reset, .rt_data(pbd[c])
    );
    assign cdat[c]    = playback_en ? {pbd[c], odd_parity9(pbd[c])} : sdat[c];
    assign clock_n[c] = playback_en ? 1'b0 : slock[c];
    spy_mem #(.DEPTH(256), .WIDTH(RAW_W)) u_spy (
      .clk, .rst, .enable(spy_en), .sync_reset, .rt_data(cdat[c]),
      .vme_rd(spy_rd[c]), .vme_ptr_reset, .vme_rdata(spy_rdata[c])
    );
    ip_channel_check #(.CNT_W(12)) u_chk (
      .clk, .rst, .din(cdat[c]), .lock_n(clock_n[c]), .mask(mask[c]), .cnt_clear,
      .energy(energy[c]), .par_err(), .link_down(link_down[c]),
      .par_err_cnt(par_err_cnt[c]), .lock_loss_cnt(lock_loss_cnt[c])
    );
    assign slice[c*(RAW_W+1) +: RAW_W+1] = {clock_n[c], cdat[c]};
  end

  for (genvar j = 0; j < NJ; j++) begin : g_je
    je_former u_jef (.clk, .rst, .em(energy[2*j]), .had(energy[2*j+1]), .je(je[j]));
    je_mux    u_mux (.clk2x, .bc_toggle, .je(je[j]), .dout(je_out[j]));
  end

  for (genvar r = 0; r < N_PHI; r++) begin : g_fio
    je_mux u_l0 (.clk2x, .bc_toggle, .je(je[4*r + 0]), .dout(fio_left[2*r]));
    je_mux u_l1 (.clk2x, .bc_toggle, .je(je[4*r + 1]), .dout(fio_left[2*r + 1]));
    je_mux u_r3 (.clk2x, .bc_toggle, .je(je[4*r + 3]), .dout(fio_right[r]));
  end

  energy_presum #(.N_EL(NJ)) u_esum (
    .clk, .rst, .je, .coef_x, .coef_y, .esum_en, .thr_xy, .thr_et,
    .et, .ex, .ey
  );

  readout_sequencer #(
    .N_STREAM(NS), .SLICE_BITS(SLICE_W), .LATENCY(LATENCY),
    .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP), .TAG_W(0)
  ) u_rs (
    .clk, .rst, .din((NS*SLICE_W)'(slice)), .read_req, .rr_first, .rr_last,
    .sout(daq_stream), .sout_valid(daq_valid), .fifo_count(), .overflow()
  );
endmodule
