// tb_jem_registers: checks reset values (energy sums enabled for the 32
// core elements, jet definitions disabled, one slice), write/read-back of
// channel control, coefficients, thresholds, enables, jet definitions, FCAL
// and readout settings, that the decoded outputs follow the writes, the
// one-tick diagnostic pulses and playback write strobes, and the status,
// counter and spy read paths with their pointer-advance strobes.
module tb_jem_registers;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [REG_AW-1:0] bus_addr = '0;
  logic [15:0] bus_wdata = '0, bus_rdata;
  logic bus_we = 0, bus_re = 0;
  logic ch_phase [N_CH];
  logic [3:0] ch_delay [N_CH];
  logic ch_mask [N_CH];
  logic signed [COEF_W-1:0] coef_x [N_JE];
  logic signed [COEF_W-1:0] coef_y [N_JE];
  je_t thr_xy, thr_et, thr_jet;
  logic [N_JE-1:0] esum_en;
  jet_def_t defs [8];
  jet_def_t fcal_defs [4];
  logic [ENV_ETA-1:0] fcal_col;
  logic [ENV_PHI-1:0] fcal_copy;
  logic fcal_mode;
  logic [5:0] ro_offset;
  logic [2:0] ro_slices;
  logic playback_en, spy_en, vme_ptr_reset, cnt_clear;
  logic [N_CH-1:0] pb_we;
  logic [EN_W-1:0] pb_wdata;
  logic [N_CH-1:0] spy_rd_ip;
  logic spy_rd_sum, spy_rd_jet;
  logic ttc_ready = 1;
  logic [N_CH-1:0] link_down = '0;
  logic link_ovf = 0;
  logic [11:0] par_err_cnt [N_CH];
  logic [11:0] lock_loss_cnt [N_CH];
  logic [RAW_W-1:0] spy_ip [N_CH];
  logic [MERGE_W-1:0] spy_sum = 25'h1234567, spy_jet = 25'h0ABCDEF;
  int checks = 0, failures = 0;

  jem_registers dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [REG_AW-1:0] a, input logic [15:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(posedge clk); #1 bus_we = 0;
  endtask
  task automatic chk(input logic [REG_AW-1:0] a, input logic [15:0] e, input string what);
    bus_addr = a; #1;
    checks++;
    if (bus_rdata !== e) begin failures++; $display("FAIL %s @%h: %h exp %h", what, a, bus_rdata, e); end
  endtask
  task automatic ok(input bit c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      par_err_cnt[c] = 12'(c); lock_loss_cnt[c] = 12'(c + 100); spy_ip[c] = RAW_W'(c * 3);
    end
    link_down[5] = 1;
    repeat (2) @(posedge clk); #1 rst = 0;
    // reset values
    ok(esum_en == {8'h00, 32'hFFFF_FFFF, 4'h0}, "esum_en reset");
    ok(ro_slices == 1 && ro_offset == 0 && !fcal_mode && !playback_en, "ro reset");
    for (int d = 0; d < 8; d++) ok(defs[d].thr == JE_SAT, "defs reset");
    chk(RA_STATUS, 16'h0003, "status");
    // channel control
    for (int c = 0; c < N_CH; c++) wr(RA_CHCTRL + REG_AW'(c), 16'(c % 64));
    for (int c = 0; c < N_CH; c++) begin
      chk(RA_CHCTRL + REG_AW'(c), 16'(c % 64), "chctrl");
      ok(ch_phase[c] == c[0] && ch_delay[c] == 4'(c >> 1) && ch_mask[c] == c[5], "chctrl decode");
    end
    // coefficients
    for (int j = 0; j < N_JE; j++) begin
      wr(RA_COEF_X + REG_AW'(j), 16'(j * 37)); wr(RA_COEF_Y + REG_AW'(j), 16'(-j * 19));
    end
    for (int j = 0; j < N_JE; j++) begin
      chk(RA_COEF_X + REG_AW'(j), 16'(12'(j * 37)), "coef_x");
      ok(coef_x[j] == 12'(j * 37) && coef_y[j] == 12'(-j * 19), "coef decode");
    end
    wr(RA_THR_XY, 16'd5); wr(RA_THR_ET, 16'd9); wr(RA_THR_JET, 16'd3);
    ok(thr_xy == 5 && thr_et == 9 && thr_jet == 3, "thresholds");
    chk(RA_THR_ET, 16'd9, "thr_et");
    wr(RA_ESUM_EN, 16'h1234); wr(RA_ESUM_EN + 1, 16'h5678); wr(RA_ESUM_EN + 2, 16'h0ABC);
    ok(esum_en == 44'hABC_5678_1234, "esum_en");
    chk(RA_ESUM_EN + 2, 16'h0ABC, "esum_en rd");
    for (int d = 0; d < 12; d++) wr(RA_JETDEF + REG_AW'(d), {4'b0, 2'(d % 3), 10'(d * 50)});
    for (int d = 0; d < 12; d++) chk(RA_JETDEF + REG_AW'(d), {4'b0, 2'(d % 3), 10'(d * 50)}, "jetdef");
    ok(defs[4].size == CL_3X3 && defs[4].thr == 200 && fcal_defs[3].size == CL_4X4 && fcal_defs[3].thr == 550, "def decode");
    wr(RA_FCAL_COL, 16'h41); wr(RA_FCAL_COPY, 16'h2AA); wr(RA_FCAL_MODE, 16'h1);
    ok(fcal_col == 7'h41 && fcal_copy == 11'h2AA && fcal_mode, "fcal");
    wr(RA_RO_OFFSET, 16'd37); wr(RA_RO_SLICES, 16'd5);
    ok(ro_offset == 37 && ro_slices == 5, "readout");
    // diagnostic pulses
    bus_addr = RA_DIAG; bus_wdata = 16'hF; bus_we = 1;
    @(posedge clk); #1 bus_we = 0;
    ok(vme_ptr_reset && cnt_clear && playback_en && spy_en, "diag pulse");
    @(posedge clk); #1;
    ok(!vme_ptr_reset && !cnt_clear && playback_en && spy_en, "diag pulse length");
    chk(RA_DIAG, 16'h3, "diag rd");
    // playback write strobe
    bus_addr = RA_PLAYBACK + 7; bus_wdata = 16'h1AB; bus_we = 1;
    @(posedge clk); #1 bus_we = 0;
    ok(pb_we == (88'd1 << 7) && pb_wdata == 9'h1AB, "pb write");
    @(posedge clk); #1;
    ok(pb_we == '0, "pb write length");
    // counters, status, spies
    chk(RA_ERRCNT + 5, {3'b0, 1'b1, 12'd5}, "par err");
    chk(RA_ERRCNT + 88 + 9, {3'b0, 1'b0, 12'd109}, "lock loss");
    chk(RA_SPY_IP + 20, 16'd60, "spy ip");
    chk(RA_SPY_SUM, 16'h4567, "spy sum lo");
    chk(RA_SPY_SUM + 1, 16'h0123, "spy sum hi");
    chk(RA_SPY_JET + 1, 16'h00AB, "spy jet hi");
    bus_re = 1; bus_addr = RA_SPY_SUM + 1; #1;
    ok(spy_rd_sum && !spy_rd_jet, "spy sum strobe");
    bus_addr = RA_SPY_SUM; #1;
    ok(!spy_rd_sum, "spy sum lo no strobe");
    bus_addr = RA_SPY_IP + 3; #1;
    ok(spy_rd_ip == (88'd1 << 3), "spy ip strobe");
    bus_re = 0;
    ttc_ready = 0; link_down = '0;
    chk(RA_STATUS, 16'h0000, "status 2");
    link_ovf = 1;
    chk(RA_STATUS, 16'h0004, "status link overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
