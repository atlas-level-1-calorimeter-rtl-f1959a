// tb_input_processor: a 2-row input processor (16 channels, 8 jet elements,
// as processor U) with short readout latency.  For random static input
// patterns (some saturated channels, parity errors, a masked channel) it
// checks after settling: the 5-bit jet-element lines and backplane copies
// (low half on the first half of the bunch period, high half on the
// second), the Et/Ex/Ey pre-sums against a model, and the error counters.
// It then issues a one-slice read request and checks the 3 DAQ streams
// ({lock, data} of 6 channels per stream, odd parity).
module tb_input_processor;
  import jem_pkg::*;
  localparam int NPHI = 2, NJ = 4 * NPHI, NC = 2 * NJ, NS = 3, LAT = 8;
  logic clk = 0, clk2x = 0, rst = 1, bc_toggle;
  logic [RAW_W-1:0] din [NC];
  logic lock_n [NC], phase_sel [NC], mask [NC];
  logic [3:0] delay [NC];
  logic cnt_clear = 0;
  logic [11:0] par_err_cnt [NC], lock_loss_cnt [NC];
  logic [NC-1:0] link_down;
  logic signed [COEF_W-1:0] coef_x [NJ], coef_y [NJ];
  logic [NJ-1:0] esum_en = '1;
  je_t thr_xy = 10'd2, thr_et = 10'd4;
  logic playback_en = 0, spy_en = 0, sync_reset = 0, vme_ptr_reset = 0;
  logic [NC-1:0] pb_we = '0, spy_rd = '0;
  logic [EN_W-1:0] pb_wdata = '0;
  logic [RAW_W-1:0] spy_rdata [NC];
  logic [HALF_W-1:0] je_out [NJ], fio_left [2*NPHI], fio_right [NPHI];
  logic [ET_W-1:0] et;
  logic signed [EXY_W-1:0] ex, ey;
  logic read_req = 0, rr_first = 0, rr_last = 0;
  logic [NS-1:0] daq_stream;
  logic daq_valid;
  int checks = 0, failures = 0, n_sat = 0, n_perr = 0;

  input_processor #(.N_PHI(NPHI), .LATENCY(LAT), .FIFO_DEPTH(16), .GAP(20)) dut (.*);
  initial forever begin #5 clk2x = ~clk2x; if (clk2x) clk = ~clk; end
  always_ff @(posedge clk) bc_toggle <= rst ? 1'b0 : ~bc_toggle;
  initial begin
    #4000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [8:0] en [NC];
  bit bad [NC];
  function automatic int fdiv(input int v, input int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction
  function automatic je_t jel(input int j);
    logic [8:0] a, b;
    a = (bad[2*j] || mask[2*j]) ? 9'd0 : en[2*j];
    b = (bad[2*j+1] || mask[2*j+1]) ? 9'd0 : en[2*j+1];
    if (a == 9'h1FF || b == 9'h1FF) return JE_SAT;
    return je_t'(a) + je_t'(b);
  endfunction

  initial begin
    for (int c = 0; c < NC; c++) begin
      din[c] = 10'h001; lock_n[c] = 0; phase_sel[c] = c % 2; mask[c] = 0; delay[c] = 4'(c % 3);
    end
    for (int j = 0; j < NJ; j++) begin coef_x[j] = 12'($urandom); coef_y[j] = 12'($urandom); end
    repeat (4) @(posedge clk); #1 rst = 0;
    mask[5] = 1;
    for (int n = 0; n < 40; n++) begin
      int e, x, y; bit s;
      for (int c = 0; c < NC; c++) begin
        en[c] = (n % 5 == 4 && c == n % NC) ? 9'h1FF : 9'($urandom % 300);
        bad[c] = (n % 7 == 3 && c == 9);
        din[c] = {en[c], ~(^en[c]) ^ bad[c]};
      end
      repeat (30) @(posedge clk);
      // jet element lines: low half in the first half period, high half in the second
      for (int j = 0; j < NJ; j++) begin
        logic [4:0] lo, hi, l0, h0, r0, r1;
        #1 lo = je_out[j];
        if (j % 4 == 0) l0 = fio_left[2 * (j / 4)];
        if (j % 4 == 3) r0 = fio_right[j / 4];
        @(posedge clk2x); #1 hi = je_out[j];
        if (j % 4 == 0) h0 = fio_left[2 * (j / 4)];
        if (j % 4 == 3) r1 = fio_right[j / 4];
        checks++;
        if ({hi, lo} !== jel(j)) begin failures++; $display("FAIL n=%0d je %0d %h exp %h", n, j, {hi, lo}, jel(j)); end
        if (j % 4 == 0) begin checks++; if ({h0, l0} !== jel(j)) begin failures++; $display("FAIL fio_left %0d", j); end end
        if (j % 4 == 3) begin checks++; if ({r1, r0} !== jel(j)) begin failures++; $display("FAIL fio_right %0d", j); end end
        @(posedge clk);
      end
      // energy pre-sums
      e = 0; x = 0; y = 0; s = 0;
      for (int j = 0; j < NJ; j++) begin
        int v; v = int'(jel(j));
        if (v == 1023) n_sat++;
        if (v >= thr_et) begin e += v; if (v == 1023) s = 1; end
        if (v >= thr_xy) begin
          x += fdiv(v * int'(coef_x[j]) + 128, 256); y += fdiv(v * int'(coef_y[j]) + 128, 256);
        end
      end
      if (s || e > 4095) e = 4095;
      x = (x > 8191) ? 8191 : (x < -8192) ? -8192 : x;
      y = (y > 8191) ? 8191 : (y < -8192) ? -8192 : y;
      #1 checks++;
      if (et !== 12'(e) || ex !== 14'(x) || ey !== 14'(y)) begin
        failures++; $display("FAIL n=%0d sums %0d %0d %0d exp %0d %0d %0d", n, et, ex, ey, e, x, y);
      end
    end
    checks++;
    n_perr = int'(par_err_cnt[9]);
    if (n_perr == 0 || par_err_cnt[5] != 0 || n_sat == 0) begin failures++; $display("FAIL counters/saturation"); end
    // readout of one slice
    @(posedge clk); #1 read_req = 1; rr_first = 1; rr_last = 1;
    @(posedge clk); #1 read_req = 0; rr_first = 0; rr_last = 0;
    begin
      logic [66:0] w [NS];
      int nb, t;
      nb = 0; t = 0;
      while (nb < 67 && t < 200) begin
        @(posedge clk); #1; t++;
        if (daq_valid) begin
          for (int s = 0; s < NS; s++) w[s] = {w[s][65:0], daq_stream[s]};
          nb++;
        end
      end
      checks++;
      if (nb != 67) begin failures++; $display("FAIL no DAQ slice"); end
      else
        for (int c = 0; c < NC; c++) begin
          logic [10:0] f;
          f = w[c / 6][1 + 11 * (c % 6) +: 11];
          checks++;
          if (f !== {1'b0, din[c]} || ^w[c / 6] !== 1'b1) begin
            failures++; $display("FAIL DAQ ch %0d %h exp %h", c, f, {1'b0, din[c]});
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
