// jem_registers: VME control and status registers of the JEM.
//
// Holds every software-set parameter of the real-time path and the readout,
// and maps status and diagnostic memories into the register space (word
// addresses, see jem_pkg):
//   RA_CHCTRL+c     channel c: [0] phase select, [4:1] delay, [5] mask
//   RA_COEF_X/Y+j   signed 12-bit Ex / Ey coefficient of jet element j
//   RA_THR_XY/ET/JET low (Ex/Ey), high (Et) and jet processor thresholds
//   RA_ESUM_EN+w    energy-sum enable of jet elements 16w..16w+15
//   RA_JETDEF+d     jet definition d (0-7 central, 8-11 FCAL): [9:0] threshold,
//                   [11:10] cluster size (0 2x2, 1 3x3, 2 4x4)
//   RA_FCAL_COL/COPY/MODE  FCAL multiplexer settings and multiplicity format
//   RA_RO_OFFSET/SLICES    ReadRequest offset (0-63) and DAQ slices (1-5)
//   RA_DIAG         [0] playback mode [1] spy mode; writing 1 to [2] resets the
//                   VME memory pointers, to [3] clears the error counters
//   RA_STATUS       [0] TTC ready, [1] any input link down, [2] readout link
//                   re-synchronisation buffer overflow (sticky)
//   RA_ERRCNT+c / +88+c   parity error / lock loss counter of channel c
//   RA_PLAYBACK+c   playback memory of channel c (write, address auto-increments)
//   RA_SPY_IP+c     input spy memory of channel c (read, auto-increments)
//   RA_SPY_SUM/JET  25-bit spy words: +0 low 16 bits, +1 high bits (reading
//                   the high word advances the pointer)
// Reset values: coefficients and thresholds 0, jet definitions disabled
// (threshold 0x3FF), energy sums enabled for the 32 core elements (phi rows
// 1..8), one slice, offset 0.  The map and reset values are this design's.
// Timing: writes take effect on the tick after the bus strobe; reads are
// combinational.
module jem_registers
  import jem_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic [REG_AW-1:0]        bus_addr,
  input  logic [15:0]              bus_wdata,
  input  logic                     bus_we,
  input  logic                     bus_re,
  output logic [15:0]              bus_rdata,
  // channel control
  output logic                     ch_phase [N_CH],
  output logic [3:0]               ch_delay [N_CH],
  output logic                     ch_mask  [N_CH],
  // energy
  output logic signed [COEF_W-1:0] coef_x [N_JE],
  output logic signed [COEF_W-1:0] coef_y [N_JE],
  output je_t                      thr_xy,
  output je_t                      thr_et,
  output logic [N_JE-1:0]          esum_en,
  // jets
  output je_t                      thr_jet,
  output jet_def_t                 defs      [8],
  output jet_def_t                 fcal_defs [4],
  output logic [ENV_ETA-1:0]       fcal_col,
  output logic [ENV_PHI-1:0]       fcal_copy,
  output logic                     fcal_mode,
  // readout
  output logic [5:0]               ro_offset,
  output logic [2:0]               ro_slices,
  // diagnostics
  output logic                     playback_en,
  output logic                     spy_en,
  output logic                     vme_ptr_reset,
  output logic                     cnt_clear,
  output logic [N_CH-1:0]          pb_we,
  output logic [EN_W-1:0]          pb_wdata,
  output logic [N_CH-1:0]          spy_rd_ip,
  output logic                     spy_rd_sum,
  output logic                     spy_rd_jet,
  // status
  input  logic                     ttc_ready,
  input  logic [N_CH-1:0]          link_down,
  input  logic                     link_ovf,
  input  logic [11:0]              par_err_cnt   [N_CH],
  input  logic [11:0]              lock_loss_cnt [N_CH],
  input  logic [RAW_W-1:0]         spy_ip  [N_CH],
  input  logic [MERGE_W-1:0]       spy_sum,
  input  logic [MERGE_W-1:0]       spy_jet
);
  localparam int unsigned A_CH   = int'(RA_CHCTRL);
  localparam int unsigned A_CX   = int'(RA_COEF_X);
  localparam int unsigned A_CY   = int'(RA_COEF_Y);
  localparam int unsigned A_EE   = int'(RA_ESUM_EN);
  localparam int unsigned A_JD   = int'(RA_JETDEF);
  localparam int unsigned A_ERR  = int'(RA_ERRCNT);
  localparam int unsigned A_PB   = int'(RA_PLAYBACK);
  localparam int unsigned A_SPY  = int'(RA_SPY_IP);

  int unsigned a;
  assign a = int'(bus_addr);

  function automatic jet_def_t to_def(input logic [15:0] w);
    jet_def_t d;
    d.thr  = w[9:0];
    d.size = cluster_size_e'(w[11:10]);
    return d;
  endfunction

  function automatic logic [15:0] from_def(input jet_def_t d);
    return {4'b0, 2'(d.size), d.thr};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < N_CH; c++) begin
        ch_phase[c] <= 1'b0; ch_delay[c] <= '0; ch_mask[c] <= 1'b0;
      end
      for (int j = 0; j < N_JE; j++) begin
        coef_x[j] <= '0; coef_y[j] <= '0;
        esum_en[j] <= (j >= 4 && j < 36);
      end
      thr_xy <= '0; thr_et <= '0; thr_jet <= '0;
      for (int d = 0; d < 8; d++) defs[d]      <= '{size: CL_2X2, thr: JE_SAT};
      for (int d = 0; d < 4; d++) fcal_defs[d] <= '{size: CL_2X2, thr: JE_SAT};
      fcal_col <= '0; fcal_copy <= '0; fcal_mode <= 1'b0;
      ro_offset <= '0; ro_slices <= 3'd1;
      playback_en <= 1'b0; spy_en <= 1'b0;
      vme_ptr_reset <= 1'b0; cnt_clear <= 1'b0;
      pb_we <= '0; pb_wdata <= '0;
    end else begin
      vme_ptr_reset <= 1'b0;
      cnt_clear     <= 1'b0;
      pb_we         <= '0;
      if (bus_we) begin
        if (a >= A_CH && a < A_CH + N_CH) begin
          ch_phase[a - A_CH] <= bus_wdata[0];
          ch_delay[a - A_CH] <= bus_wdata[4:1];
          ch_mask [a - A_CH] <= bus_wdata[5];
        end
        if (a >= A_CX && a < A_CX + N_JE) coef_x[a - A_CX] <= bus_wdata[COEF_W-1:0];
        if (a >= A_CY && a < A_CY + N_JE) coef_y[a - A_CY] <= bus_wdata[COEF_W-1:0];
        if (a >= A_EE && a < A_EE + 3)
          for (int b = 0; b < 16; b++)
            if (16*(a - A_EE) + b < N_JE) esum_en[16*(a - A_EE) + b] <= bus_wdata[b];
        if (a >= A_JD && a < A_JD + 8)      defs[a - A_JD]          <= to_def(bus_wdata);
        if (a >= A_JD + 8 && a < A_JD + 12) fcal_defs[a - A_JD - 8] <= to_def(bus_wdata);
        if (a >= A_PB && a < A_PB + N_CH) begin
          pb_we[a - A_PB] <= 1'b1;
          pb_wdata        <= bus_wdata[EN_W-1:0];
        end
        case (bus_addr)
          RA_THR_XY:    thr_xy    <= bus_wdata[JE_W-1:0];
          RA_THR_ET:    thr_et    <= bus_wdata[JE_W-1:0];
          RA_THR_JET:   thr_jet   <= bus_wdata[JE_W-1:0];
          RA_FCAL_COL:  fcal_col  <= bus_wdata[ENV_ETA-1:0];
          RA_FCAL_COPY: fcal_copy <= bus_wdata[ENV_PHI-1:0];
          RA_FCAL_MODE: fcal_mode <= bus_wdata[0];
          RA_RO_OFFSET: ro_offset <= bus_wdata[5:0];
          RA_RO_SLICES: ro_slices <= bus_wdata[2:0];
          RA_DIAG: begin
            playback_en   <= bus_wdata[0];
            spy_en        <= bus_wdata[1];
            vme_ptr_reset <= bus_wdata[2];
            cnt_clear     <= bus_wdata[3];
          end
          default: ;
        endcase
      end
    end
  end

  // read strobes for the spy memories (advance after the word has been read)
  always_comb begin
    spy_rd_ip  = '0;
    spy_rd_sum = bus_re && (bus_addr == RA_SPY_SUM + 1'b1);
    spy_rd_jet = bus_re && (bus_addr == RA_SPY_JET + 1'b1);
    if (bus_re && a >= A_SPY && a < A_SPY + N_CH) spy_rd_ip[a - A_SPY] = 1'b1;
  end

  // read multiplexer
  always_comb begin
    bus_rdata = '0;
    if (a >= A_CH && a < A_CH + N_CH)
      bus_rdata = {10'b0, ch_mask[a - A_CH], ch_delay[a - A_CH], ch_phase[a - A_CH]};
    else if (a >= A_CX && a < A_CX + N_JE) bus_rdata = 16'(coef_x[a - A_CX]);
    else if (a >= A_CY && a < A_CY + N_JE) bus_rdata = 16'(coef_y[a - A_CY]);
    else if (a >= A_EE && a < A_EE + 3) begin
      for (int b = 0; b < 16; b++)
        if (16*(a - A_EE) + b < N_JE) bus_rdata[b] = esum_en[16*(a - A_EE) + b];
    end
    else if (a >= A_JD && a < A_JD + 8)      bus_rdata = from_def(defs[a - A_JD]);
    else if (a >= A_JD + 8 && a < A_JD + 12) bus_rdata = from_def(fcal_defs[a - A_JD - 8]);
    else if (a >= A_ERR && a < A_ERR + N_CH) bus_rdata = {3'b0, link_down[a - A_ERR], par_err_cnt[a - A_ERR]};
    else if (a >= A_ERR + N_CH && a < A_ERR + 2*N_CH)
      bus_rdata = {3'b0, link_down[a - A_ERR - N_CH], lock_loss_cnt[a - A_ERR - N_CH]};
    else if (a >= A_SPY && a < A_SPY + N_CH) bus_rdata = 16'(spy_ip[a - A_SPY]);
    else begin
      case (bus_addr)
        RA_THR_XY:    bus_rdata = 16'(thr_xy);
        RA_THR_ET:    bus_rdata = 16'(thr_et);
        RA_THR_JET:   bus_rdata = 16'(thr_jet);
        RA_FCAL_COL:  bus_rdata = 16'(fcal_col);
        RA_FCAL_COPY: bus_rdata = 16'(fcal_copy);
        RA_FCAL_MODE: bus_rdata = 16'(fcal_mode);
        RA_RO_OFFSET: bus_rdata = 16'(ro_offset);
        RA_RO_SLICES: bus_rdata = 16'(ro_slices);
        RA_DIAG:      bus_rdata = {14'b0, spy_en, playback_en};
        RA_STATUS:    bus_rdata = {13'b0, link_ovf, |link_down, ttc_ready};
        RA_SPY_SUM:   bus_rdata = spy_sum[15:0];
        RA_SPY_SUM + 1'b1: bus_rdata = 16'(spy_sum[MERGE_W-1:16]);
        RA_SPY_JET:   bus_rdata = spy_jet[15:0];
        RA_SPY_JET + 1'b1: bus_rdata = 16'(spy_jet[MERGE_W-1:16]);
        default:      bus_rdata = '0;
      endcase
    end
  end
endmodule
