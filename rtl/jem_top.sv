// jem_top: Jet/Energy Module (JEM) of a level-1 calorimeter trigger.
//
// The module receives 88 trigger-tower energies per bunch crossing (44
// electromagnetic + 44 hadronic, 10-bit words from LVDS deserialisers), and
// in a fixed-latency pipeline:
//   * four input processors (R, S, T: 3 phi rows each; U: 2 rows) check and
//     synchronise the channels and build 44 jet elements (em + had), which go
//     to the jet processor as 5-bit words at twice the bunch clock; copies of
//     the outer elements go over the backplane to the neighbouring JEMs; the
//     input processors also pre-sum Et, Ex, Ey;
//   * the sum processor adds the pre-sums of R, S and T (the core area),
//     compresses them and drives a 25-bit energy word to the energy merger;
//   * the jet processor runs the sliding-window jet algorithm over 7 x 11
//     jet elements (local + neighbour data) and drives a 25-bit jet
//     multiplicity word to the jet merger;
//   * on each Level-1 accept, readout sequencers in every processor send the
//     latency-buffered input and output data (DAQ, 16-bit link word) and the
//     jet regions of interest (RoI, 5-bit link word) to the readout links;
//   * a reduced VME bus reaches all control registers, playback and spy
//     memories.
// Channel numbering follows the module's channel map: channel 8*row + 2*eta
// is electromagnetic, the next one hadronic; jet element 4*row + eta.
//
// Clocks: clk is the bunch clock (40.08 MHz), clk2x twice it and phase
// aligned (DLL); clk_xtal is the local 40 MHz crystal clock of the readout
// link chips: the DAQ and RoI link words are re-synchronised to it
// (link_resync) and leave the module in that domain.  Everything is reset
// synchronously by rst.  ttc_ready low
// forces the merger outputs to zero and disables the readout links.
module jem_top
  import jem_pkg::*;
#(
  parameter int unsigned LATENCY    = 48,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned GAP        = 20
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               clk_xtal,
  input  logic               rst,
  input  logic [5:0]         geoadd,
  // deserialiser outputs
  input  logic [RAW_W-1:0]   lvds_data   [N_CH],
  input  logic               lvds_lock_n [N_CH],
  // backplane fan-in / fan-out (5-bit words at twice the bunch clock)
  input  logic [HALF_W-1:0]  fio_from_left  [ENV_PHI],
  input  logic [HALF_W-1:0]  fio_from_right [2*ENV_PHI],
  output logic [HALF_W-1:0]  fio_to_left    [2*ENV_PHI],
  output logic [HALF_W-1:0]  fio_to_right   [ENV_PHI],
  // TTC decoder signals
  input  logic               ttc_ready,
  input  logic               l1a,
  input  logic               bcnt_res,
  input  logic               sync_bcast,     // short broadcast: align playback/spy pointers
  // reduced VME bus
  input  logic [23:1]        vme_a,
  input  logic [15:0]        vme_d_in,
  output logic [15:0]        vme_d_out,
  output logic               vme_d_oe,
  input  logic               vme_ds0_n,
  input  logic               vme_write_n,
  output logic               vme_dtack_n,
  // merger outputs
  output logic [MERGE_W-1:0] hits_out,
  output logic [MERGE_W-1:0] esum_out,
  // readout link words (crystal clock domain)
  output logic [15:0]        daq_link,
  output logic               daq_dav,
  output logic [4:0]         roi_link,
  output logic               roi_dav
);
  // bunch clock phase marker for the twice-bunch-clock logic
  logic bc_toggle;
  always_ff @(posedge clk) bc_toggle <= rst ? 1'b0 : ~bc_toggle;

  // ---------------- VME and registers ----------------
  logic [REG_AW-1:0] bus_addr;
  logic [15:0]       bus_wdata, bus_rdata;
  logic              bus_we, bus_re;

  vme_interface u_vme (
    .clk, .rst, .geoadd, .vme_a, .vme_d_in, .vme_d_out, .vme_d_oe,
    .vme_ds0_n, .vme_write_n, .vme_dtack_n,
    .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata
  );

  logic                     ch_phase [N_CH];
  logic [3:0]               ch_delay [N_CH];
  logic                     ch_mask  [N_CH];
  logic signed [COEF_W-1:0] coef_x [N_JE];
  logic signed [COEF_W-1:0] coef_y [N_JE];
  je_t                      thr_xy, thr_et, thr_jet;
  logic [N_JE-1:0]          esum_en;
  jet_def_t                 defs [8];
  jet_def_t                 fcal_defs [4];
  logic [ENV_ETA-1:0]       fcal_col;
  logic [ENV_PHI-1:0]       fcal_copy;
  logic                     fcal_mode;
  logic [5:0]               ro_offset;
  logic [2:0]               ro_slices;
  logic                     playback_en, spy_en, vme_ptr_reset, cnt_clear;
  logic [N_CH-1:0]          pb_we, spy_rd_ip;
  logic [EN_W-1:0]          pb_wdata;
  logic                     spy_rd_sum, spy_rd_jet;
  logic [N_CH-1:0]          link_down;
  logic [11:0]              par_err_cnt   [N_CH];
  logic [11:0]              lock_loss_cnt [N_CH];
  logic [RAW_W-1:0]         spy_ip [N_CH];
  logic [MERGE_W-1:0]       spy_sum, spy_jet;
  logic                     daq_ovf, roi_ovf;

  jem_registers u_regs (
    .clk, .rst, .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .ch_phase, .ch_delay, .ch_mask, .coef_x, .coef_y, .thr_xy, .thr_et, .esum_en,
    .thr_jet, .defs, .fcal_defs, .fcal_col, .fcal_copy, .fcal_mode,
    .ro_offset, .ro_slices, .playback_en, .spy_en, .vme_ptr_reset, .cnt_clear,
    .pb_we, .pb_wdata, .spy_rd_ip, .spy_rd_sum, .spy_rd_jet,
    .ttc_ready, .link_down, .link_ovf(daq_ovf | roi_ovf), .par_err_cnt, .lock_loss_cnt, .spy_ip, .spy_sum, .spy_jet
  );

  // ---------------- input processors ----------------
  logic [HALF_W-1:0]       je_lines [N_JE];
  logic [ET_W-1:0]         ip_et [N_IP];
  logic signed [EXY_W-1:0] ip_ex [N_IP];
  logic signed [EXY_W-1:0] ip_ey [N_IP];
  logic [14:0]             ip_stream;
  logic [14:0]             ip_valid;
  logic                    read_req, rr_first, rr_last;

  for (genvar k = 0; k < N_IP; k++) begin : g_ip
    localparam int unsigned NPHI = (k < 3) ? 3 : 2;
    localparam int unsigned NJ   = 4 * NPHI;
    localparam int unsigned NC   = 8 * NPHI;
    localparam int unsigned NS   = (k < 3) ? 4 : 3;
    localparam int unsigned C0   = 24 * k;   // first channel
    localparam int unsigned J0   = 12 * k;   // first jet element
    localparam int unsigned R0   = 3 * k;    // first phi row

    logic [RAW_W-1:0]         din [NC];
    logic                     lk  [NC];
    logic                     ph  [NC];
    logic [3:0]               dl  [NC];
    logic                     mk  [NC];
    logic [11:0]              pec [NC];
    logic [11:0]              llc [NC];
    logic [RAW_W-1:0]         spd [NC];
    logic signed [COEF_W-1:0] cx  [NJ];
    logic signed [COEF_W-1:0] cy  [NJ];
    logic [HALF_W-1:0]        jo  [NJ];
    logic [HALF_W-1:0]        fl  [2*NPHI];
    logic [HALF_W-1:0]        fr  [NPHI];
    logic [NS-1:0]            ds;
    logic                     dv;

    for (genvar c = 0; c < NC; c++) begin : g_c
      assign din[c] = lvds_data[C0 + c];
      assign lk[c]  = lvds_lock_n[C0 + c];
      assign ph[c]  = ch_phase[C0 + c];
      assign dl[c]  = ch_delay[C0 + c];
      assign mk[c]  = ch_mask[C0 + c];
      assign par_err_cnt[C0 + c]   = pec[c];
      assign lock_loss_cnt[C0 + c] = llc[c];
      assign spy_ip[C0 + c]        = spd[c];
    end
    for (genvar j = 0; j < NJ; j++) begin : g_j
      assign cx[j] = coef_x[J0 + j];
      assign cy[j] = coef_y[J0 + j];
      assign je_lines[J0 + j] = jo[j];
    end
    for (genvar r = 0; r < NPHI; r++) begin : g_r
      assign fio_to_left[2*(R0 + r)]     = fl[2*r];
      assign fio_to_left[2*(R0 + r) + 1] = fl[2*r + 1];
      assign fio_to_right[R0 + r]        = fr[r];
    end

    input_processor #(
      .N_PHI(NPHI), .LATENCY(LATENCY), .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP)
    ) u_ip (
      .clk, .clk2x, .rst, .bc_toggle,
      .din, .lock_n(lk), .phase_sel(ph), .delay(dl), .mask(mk), .cnt_clear,
      .par_err_cnt(pec), .lock_loss_cnt(llc), .link_down(link_down[C0 +: NC]),
      .coef_x(cx), .coef_y(cy), .esum_en(esum_en[J0 +: NJ]), .thr_xy, .thr_et,
      .playback_en, .spy_en, .sync_reset(sync_bcast), .vme_ptr_reset,
      .pb_we(pb_we[C0 +: NC]), .pb_wdata, .spy_rd(spy_rd_ip[C0 +: NC]), .spy_rdata(spd),
      .je_out(jo), .fio_left(fl), .fio_right(fr),
      .et(ip_et[k]), .ex(ip_ex[k]), .ey(ip_ey[k]),
      .read_req, .rr_first, .rr_last, .daq_stream(ds), .daq_valid(dv)
    );

    assign ip_stream[4*k +: NS] = ds;
    assign ip_valid[4*k +: NS]  = {NS{dv}};
  end

  // ---------------- jet processor ----------------
  logic [MERGE_W-1:0] jet_hits;
  logic [15:0]        daq_link_bc;
  logic               daq_dav_bc;
  logic [4:0]         roi_link_bc;
  logic               roi_dav_bc;
  jet_processor #(.LATENCY(LATENCY), .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP)) u_jp (
    .clk, .clk2x, .rst, .bc_toggle,
    .je_local(je_lines), .fio_from_right, .fio_from_left,
    .thr_jet, .fcal_col, .copy_from_below(fcal_copy), .fcal_mode, .defs, .fcal_defs,
    .ttc_ready, .l1a, .bcnt_res, .sync_reset(sync_bcast), .ro_offset,
    .hits_out(jet_hits), .roi_link(roi_link_bc), .roi_dav(roi_dav_bc),
    .spy_en, .spy_rd(spy_rd_jet), .spy_ptr_reset(vme_ptr_reset), .spy_rdata(spy_jet)
  );
  assign hits_out = jet_hits;

  // ---------------- sum processor ----------------
  logic [ET_W-1:0]         sp_et [3];
  logic signed [EXY_W-1:0] sp_ex [3];
  logic signed [EXY_W-1:0] sp_ey [3];
  for (genvar k = 0; k < 3; k++) begin : g_sp
    assign sp_et[k] = ip_et[k];
    assign sp_ex[k] = ip_ex[k];
    assign sp_ey[k] = ip_ey[k];
  end

  sum_processor #(.LATENCY(LATENCY), .FIFO_DEPTH(FIFO_DEPTH), .GAP(GAP), .N_IP_STR(15)) u_sp (
    .clk, .rst, .et_in(sp_et), .ex_in(sp_ex), .ey_in(sp_ey), .jet_hits, .esum_out,
    .ttc_ready, .l1a, .bcnt_res, .sync_reset(sync_bcast),
    .ro_offset, .ro_slices, .read_req, .rr_first, .rr_last,
    .ip_stream, .ip_stream_valid(ip_valid), .daq_link(daq_link_bc), .daq_dav(daq_dav_bc),
    .spy_en, .spy_rd(spy_rd_sum), .spy_ptr_reset(vme_ptr_reset), .spy_rdata(spy_sum)
  );
  // ---------------- readout links: bunch clock -> crystal clock ----------------
  link_resync #(.W(16)) u_daq_sync (
    .wclk(clk), .wrst(rst), .din(daq_link_bc), .din_dav(daq_dav_bc),
    .rclk(clk_xtal), .dout(daq_link), .dout_dav(daq_dav), .overflow(daq_ovf)
  );
  link_resync #(.W(5)) u_roi_sync (
    .wclk(clk), .wrst(rst), .din(roi_link_bc), .din_dav(roi_dav_bc),
    .rclk(clk_xtal), .dout(roi_link), .dout_dav(roi_dav), .overflow(roi_ovf)
  );
endmodule
