// tb_jem_top: end-to-end test of the whole module at its default size (no
// parameter overrides).  Everything is configured through the VME bus.  For
// a series of static input patterns the test drives the 88 deserialiser
// words (with odd parity) and checks, once the pipeline has settled:
//   * esum_out against a model of jet-element formation, thresholds,
//     coefficient multiplication, per-processor and module sums, saturation,
//     quad-linear coding and parity;
//   * hits_out against a model of the jet algorithm (cluster sums, local
//     maxima, jet definitions, multiplicity counting) in central and FCAL
//     modes;
//   * the DAQ packet (16-bit link, 67-bit slices with odd parity, the energy
//     word in the sum-processor slice, multi-slice events) and the RoI packet
//     (45-bit slices, RoI records equal to the model) after Level-1 accepts.
// Further scenarios: parity errors, lock loss and masked channels (energy
// zeroed, error counters read over VME), playback memories loaded over VME,
// spy memories read over VME, saturated channels, multiplicity saturation,
// TTC-not-ready forcing, and accesses outside the module's VME window.
// Every mechanism is counted and the test fails if any count is zero.
// The readout links are sampled on a crystal clock 1 % slower than the bunch
// clock.  Neighbour-module backplane inputs are held at zero.
module tb_jem_top;
  import jem_pkg::*;
  logic clk = 0, clk2x = 0, clk_xtal = 0, rst = 1;
  logic [5:0] geoadd = 6'd21;
  logic [RAW_W-1:0] lvds_data [N_CH];
  logic lvds_lock_n [N_CH];
  logic [HALF_W-1:0] fio_from_left [ENV_PHI];
  logic [HALF_W-1:0] fio_from_right [2*ENV_PHI];
  logic [HALF_W-1:0] fio_to_left [2*ENV_PHI];
  logic [HALF_W-1:0] fio_to_right [ENV_PHI];
  logic ttc_ready = 1, l1a = 0, bcnt_res = 0, sync_bcast = 0;
  logic [23:1] vme_a = '0;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_ds0_n = 1, vme_write_n = 1, vme_dtack_n;
  logic [MERGE_W-1:0] hits_out, esum_out;
  logic [15:0] daq_link;
  logic daq_dav;
  logic [4:0] roi_link;
  logic roi_dav;

  jem_top dut (.*);

  initial forever begin #50 clk2x = ~clk2x; if (clk2x) clk = ~clk; end
  initial forever #101 clk_xtal = ~clk_xtal;   // link crystal clock, 1 % slower than the bunch clock

  int checks = 0, failures = 0;
  // mechanism counters
  int m_dtack = 0, m_nodtack = 0, m_esum = 0, m_esat = 0, m_hits = 0, m_jets = 0, m_sat7 = 0;
  int m_fcal = 0, m_parity = 0, m_lock = 0, m_mask = 0, m_playback = 0, m_spy = 0;
  int m_daq = 0, m_multislice = 0, m_roi = 0, m_ttc = 0, m_xysat = 0;

  initial begin
    #200000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- configuration mirror ----------------
  int cx [N_JE], cy [N_JE];
  int thr_xy = 0, thr_et = 0, thr_jet = 0;
  logic [N_JE-1:0] esum_en = {8'h00, 32'hFFFF_FFFF, 4'h0};
  jet_def_t defs [8];
  jet_def_t fdefs [4];
  logic [ENV_ETA-1:0] fcal_col = '0;
  logic fcal_mode = 0;
  int slices = 1;
  // input state
  logic [8:0] en [N_CH];
  bit bad_par [N_CH], lock_bad [N_CH], masked [N_CH];

  // ---------------- VME ----------------
  task automatic vme(input logic [REG_AW-1:0] a, input bit wr, input logic [15:0] d,
                     output logic [15:0] rd, input bit other = 0);
    int t;
    vme_a = {other ? 6'(geoadd + 1) : geoadd, 6'd0, a};
    vme_write_n = !wr; vme_d_in = d;
    @(posedge clk); #2 vme_ds0_n = 0;
    t = 0;
    while (vme_dtack_n && t < 10) begin @(posedge clk); #1; t++; end
    rd = vme_d_out;
    checks++;
    if (!other) begin
      if (t < 10) m_dtack++; else begin failures++; $display("FAIL no DTACK at %h", a); end
    end else begin
      if (t == 10) m_nodtack++; else begin failures++; $display("FAIL DTACK outside window"); end
    end
    vme_ds0_n = 1;
    repeat (3) @(posedge clk); #1;
  endtask
  task automatic wr(input logic [REG_AW-1:0] a, input logic [15:0] d);
    logic [15:0] rd;
    vme(a, 1, d, rd);
  endtask
  task automatic rdv(input logic [REG_AW-1:0] a, output logic [15:0] rd);
    vme(a, 0, '0, rd);
  endtask

  // ---------------- drive inputs ----------------
  task automatic apply_inputs;
    @(posedge clk); #1;
    for (int c = 0; c < N_CH; c++) begin
      lvds_data[c]   = {en[c], ~(^en[c]) ^ bad_par[c]};
      lvds_lock_n[c] = lock_bad[c];
    end
  endtask
  function automatic logic [8:0] eff(input int c);
    return (bad_par[c] || lock_bad[c] || masked[c]) ? 9'd0 : en[c];
  endfunction
  function automatic je_t jel(input int j);
    logic [8:0] a, b;
    a = eff(2*j); b = eff(2*j + 1);
    if (a == 9'h1FF || b == 9'h1FF) return JE_SAT;
    return je_t'(a) + je_t'(b);
  endfunction

  // ---------------- energy model ----------------
  function automatic logic [7:0] enc_u(input int v);
    if (v < 64)   return {2'd0, 6'(v)};
    if (v < 256)  return {2'd1, 6'(v / 4)};
    if (v < 1024) return {2'd2, 6'(v / 16)};
    return {2'd3, 6'(v / 64)};
  endfunction
  function automatic logic [7:0] enc_s(input int v);
    int m, sc;
    m = (v < 0) ? -v - 1 : v;
    sc = (m < 32) ? 0 : (m < 128) ? 1 : (m < 512) ? 2 : 3;
    return {2'(sc), 6'(v >>> (2 * sc))};
  endfunction
  function automatic int fdiv(input int v, input int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction
  function automatic logic [24:0] esum_model();
    int se, sx, sy; bit sat;
    se = 0; sx = 0; sy = 0; sat = 0;
    for (int k = 0; k < 3; k++) begin
      int e, x, y; bit s;
      e = 0; x = 0; y = 0; s = 0;
      for (int j = 12 * k; j < 12 * k + 12; j++) begin
        int v;
        v = int'(jel(j));
        if (!esum_en[j]) continue;
        if (v >= thr_et) begin e += v; if (v == 1023) s = 1; end
        if (v >= thr_xy) begin x += fdiv(v * cx[j] + 128, 256); y += fdiv(v * cy[j] + 128, 256); end
      end
      if (s || e > 4095) e = 4095;
      if (x > 8191 || x < -8192 || y > 8191 || y < -8192) m_xysat++;
      x = (x > 8191) ? 8191 : (x < -8192) ? -8192 : x;
      y = (y > 8191) ? 8191 : (y < -8192) ? -8192 : y;
      if (e == 4095) sat = 1;
      se += e; sx += x; sy += y;
    end
    sx = fdiv(sx, 4); sy = fdiv(sy, 4);
    if (sat || se > 4095) begin se = 4095; m_esat++; end
    sx = (sx > 2047) ? 2047 : (sx < -2048) ? -2048 : sx;
    sy = (sy > 2047) ? 2047 : (sy < -2048) ? -2048 : sy;
    begin
      logic [23:0] w;
      w = {enc_s(sy), enc_s(sx), enc_u(se)};
      return {~(^w), w};
    end
  endfunction

  // ---------------- jet model ----------------
  typedef je_t env_t [ENV_ETA][ENV_PHI];
  function automatic env_t env_model();
    env_t j;
    for (int e = 0; e < ENV_ETA; e++)
      for (int p = 0; p < ENV_PHI; p++) begin
        je_t v;
        v = (e >= 1 && e <= 4) ? jel(4 * p + e - 1) : je_t'(0);
        j[e][p] = (int'(v) < thr_jet) ? je_t'(0) : v;
      end
    for (int e = 0; e < ENV_ETA; e++)
      if (fcal_col[e])
        for (int p = 0; p < ENV_PHI; p++) if (j[e][p] != JE_SAT) j[e][p] = j[e][p] >> 1;
    return j;
  endfunction
  function automatic int csum(input env_t j, input int e, input int p, input int n, output bit sat);
    int a; a = 0; sat = 0;
    for (int i = 0; i < n; i++) for (int k = 0; k < n; k++) begin
      a += int'(j[e+i][p+k]);
      if (j[e+i][p+k] == JE_SAT) sat = 1;
    end
    return a;
  endfunction
  typedef struct { logic [23:0] hits; roi_t c [8]; roi_t f [8]; } res_t;
  function automatic res_t jet_model(input env_t j);
    res_t r;
    int cc [8], fcn [4];
    bit sdum;
    for (int d = 0; d < 8; d++) cc[d] = 0;
    for (int d = 0; d < 4; d++) fcn[d] = 0;
    for (int k = 0; k < 8; k++) begin r.c[k] = '0; r.f[k] = '0; end
    for (int k = 0; k < 8; k++) begin
      int e0, p0, me, mp, mq;
      bit found;
      e0 = 1 + 2 * (k % 2); p0 = 1 + 2 * (k / 2);
      found = 0;
      for (int q = 0; q < 4 && !found; q++) begin
        int ce, cp, v; bit lm;
        ce = e0 + q % 2; cp = p0 + q / 2;
        v = csum(j, ce, cp, 2, sdum);
        lm = 1;
        for (int ne = ce - 1; ne <= ce + 1; ne++) for (int np = cp - 1; np <= cp + 1; np++) begin
          int w;
          if (ne == ce && np == cp) continue;
          w = csum(j, ne, np, 2, sdum);
          if (ne * 16 + np < ce * 16 + cp) lm &= (v > w); else lm &= (v >= w);
        end
        if (lm) begin found = 1; me = ce; mp = cp; mq = q; end
      end
      if (found) begin
        bit isf, s2, s4, s3, ok;
        int v2, v4;
        roi_t ro;
        isf = fcal_mode && (fcal_col[me] || fcal_col[me+1]);
        v2 = csum(j, me, mp, 2, s2);
        v4 = csum(j, me - 1, mp - 1, 4, s4);
        ro.sat = s4; ro.pos = 2'(mq); ro.thr_hits = '0;
        for (int d = 0; d < (isf ? 4 : 8); d++) begin
          jet_def_t df;
          df = isf ? fdefs[d] : defs[d];
          ok = 0;
          case (df.size)
            CL_2X2: ok = s2 || v2 > int'(df.thr);
            CL_4X4: ok = s4 || v4 > int'(df.thr);
            CL_3X3: for (int a = -1; a <= 0; a++) for (int b = -1; b <= 0; b++)
                      if (csum(j, me + a, mp + b, 3, s3) > int'(df.thr) || s3) ok = 1;
            default: ok = 0;
          endcase
          if (df.thr == 10'h3FF) ok = 0;
          ro.thr_hits[d] = ok;
          if (ok) begin if (isf) fcn[d]++; else cc[d]++; end
        end
        if (isf) r.f[k] = ro; else r.c[k] = ro;
      end
    end
    r.hits = '0;
    if (!fcal_mode) for (int d = 0; d < 8; d++) r.hits[3*d +: 3] = 3'((cc[d] > 7) ? 7 : cc[d]);
    else begin
      for (int d = 0; d < 8; d++) r.hits[2*d +: 2] = 2'((cc[d] > 3) ? 3 : cc[d]);
      for (int d = 0; d < 4; d++) r.hits[16 + 2*d +: 2] = 2'((fcn[d] > 3) ? 3 : fcn[d]);
    end
    return r;
  endfunction

  // ---------------- checks ----------------
  res_t jr;
  task automatic check_outputs(input string tag);
    logic [24:0] ee;
    repeat (40) @(posedge clk); #1;
    ee = esum_model();
    jr = jet_model(env_model());
    checks++;
    if (esum_out !== ee) begin failures++; $display("FAIL %s esum %h exp %h", tag, esum_out, ee); end
    else m_esum++;
    checks++;
    if (hits_out !== {~(^jr.hits), jr.hits}) begin
      failures++; $display("FAIL %s hits %h exp %h", tag, hits_out, {~(^jr.hits), jr.hits});
    end else begin
      m_hits++;
      if (jr.hits != 0) m_jets++;
      if (fcal_mode && jr.hits[23:16] != 0) m_fcal++;
      for (int d = 0; d < 8; d++) if (!fcal_mode && jr.hits[3*d +: 3] == 3'd7) m_sat7++;
    end
  endtask

  // read out one event and check the DAQ and RoI packets
  task automatic readout(input bit expect_data);
    logic [66:0] sl [16][5];
    logic [44:0] rs [5];
    int nd, nr, t;
    logic [24:0] ee;
    repeat (60) @(posedge clk); #1;           // latency buffer holds the current pattern
    ee = esum_out;
    @(posedge clk); #1 l1a = 1; @(posedge clk); #1 l1a = 0;
    nd = 0; nr = 0; t = 0;
    while (t < 600) begin
      @(posedge clk_xtal); #1; t++;
      if (daq_dav) begin
        for (int s = 0; s < 16; s++) sl[s][nd / 67] = {sl[s][nd / 67][65:0], daq_link[s]};
        nd++;
      end
      if (roi_dav) begin
        for (int s = 0; s < 5; s++) rs[s] = {rs[s][43:0], roi_link[s]};
        nr++;
      end
    end
    checks++;
    if (!expect_data) begin
      if (nd != 0 || nr != 0) begin failures++; $display("FAIL link active while TTC not ready"); end
      else m_ttc++;
      return;
    end
    if (nd != 67 * slices || nr != 45) begin
      failures++; $display("FAIL packet lengths daq %0d (exp %0d) roi %0d", nd, 67 * slices, nr);
      return;
    end
    for (int k = 0; k < slices; k++) begin
      checks++;
      if (sl[15][k][41:17] !== ee) begin failures++; $display("FAIL daq esum field %h exp %h", sl[15][k][41:17], ee); end
      for (int s = 0; s < 16; s++) begin
        checks++;
        if (^sl[s][k] !== 1'b1) begin failures++; $display("FAIL daq parity stream %0d slice %0d", s, k); end
      end
    end
    m_daq++;
    if (slices > 1) m_multislice++;
    // RoI records (central lines 0,1; FCAL lines 3,4 are zero unless FCAL mode)
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (^rs[s] !== 1'b1 && !(s >= 3 && !fcal_mode)) begin failures++; $display("FAIL roi parity line %0d", s); end
    end
    for (int k = 0; k < 8; k++) begin
      roi_t gc, gf;
      gc = rs[k / 4][1 + 11 * (k % 4) +: 11];
      gf = fcal_mode ? roi_t'(rs[3 + k / 4][1 + 11 * (k % 4) +: 11]) : roi_t'('0);
      checks++;
      if (gc !== jr.c[k] || (fcal_mode && gf !== jr.f[k])) begin
        failures++; $display("FAIL roi %0d: %h/%h exp %h/%h", k, gc, gf, jr.c[k], jr.f[k]);
      end else if (jr.c[k] != 0 || jr.f[k] != 0) m_roi++;
    end
  endtask

  task automatic clear_inputs;
    for (int c = 0; c < N_CH; c++) begin en[c] = '0; bad_par[c] = 0; lock_bad[c] = 0; masked[c] = 0; end
  endtask
  task automatic random_inputs(input int kind);
    for (int c = 0; c < N_CH; c++)
      case (kind)
        0: en[c] = ($urandom % 6 == 0) ? 9'($urandom % 200) : 9'd0;
        1: en[c] = 9'($urandom % 40);
        2: en[c] = ($urandom % 30 == 0) ? 9'h1FF : 9'($urandom % 100);
        default: en[c] = 9'($urandom);
      endcase
  endtask
  task automatic set_defs(input bit fcal);
    for (int d = 0; d < 8; d++) begin
      defs[d] = '{cluster_size_e'($urandom % 3), 10'(20 + $urandom % 300)};
      wr(RA_JETDEF + REG_AW'(d), {4'b0, 2'(defs[d].size), defs[d].thr});
    end
    for (int d = 0; d < 4; d++) begin
      fdefs[d] = '{cluster_size_e'($urandom % 3), 10'(10 + $urandom % 150)};
      wr(RA_JETDEF + REG_AW'(8 + d), {4'b0, 2'(fdefs[d].size), fdefs[d].thr});
    end
  endtask

  initial begin
    logic [15:0] rd;
    for (int r = 0; r < ENV_PHI; r++) fio_from_left[r] = '0;
    for (int r = 0; r < 2 * ENV_PHI; r++) fio_from_right[r] = '0;
    clear_inputs();
    for (int c = 0; c < N_CH; c++) begin lvds_data[c] = 10'h001; lvds_lock_n[c] = 0; end
    repeat (4) @(posedge clk); #1 rst = 0;
    repeat (4) @(posedge clk); #1;
    // ---- configuration ----
    for (int j = 0; j < N_JE; j++) begin
      cx[j] = int'($urandom % 4096) - 2048; cy[j] = int'($urandom % 4096) - 2048;
      wr(RA_COEF_X + REG_AW'(j), 16'(cx[j])); wr(RA_COEF_Y + REG_AW'(j), 16'(cy[j]));
    end
    thr_xy = 3; thr_et = 2; thr_jet = 1;
    wr(RA_THR_XY, 16'(thr_xy)); wr(RA_THR_ET, 16'(thr_et)); wr(RA_THR_JET, 16'(thr_jet));
    set_defs(0);
    slices = 3; wr(RA_RO_SLICES, 16'd3); wr(RA_RO_OFFSET, 16'd2);
    rdv(RA_RO_SLICES, rd);
    checks++; if (rd !== 16'd3) begin failures++; $display("FAIL register read-back"); end
    vme(RA_RO_SLICES, 0, '0, rd, 1);          // other module's window: no DTACK
    wr(RA_DIAG, 16'h000A);                    // spy on, clear counters

    // ---- random patterns, central mode ----
    for (int n = 0; n < 16; n++) begin
      random_inputs(n % 4);
      apply_inputs();
      check_outputs($sformatf("random %0d", n));
      if (n % 4 == 1) readout(1);
    end
    // ---- isolated peaks in every core subregion: multiplicity saturation ----
    clear_inputs();
    for (int sp = 0; sp < 4; sp++) for (int se = 0; se < 2; se++) begin
      int j;
      j = 4 * (2 + 2 * sp) + (1 + 2 * se);   // element (eta 1+2se, row 2+2sp)
      en[2 * j] = 9'(300 + 20 * se + 40 * sp);   // rising values: no neighbour ties
    end
    for (int d = 0; d < 8; d++) begin defs[d] = '{CL_2X2, 10'(50 + d)}; wr(RA_JETDEF + REG_AW'(d), {6'b0, defs[d].thr}); end
    apply_inputs();
    check_outputs("peaks");
    readout(1);
    // ---- parity errors, lock loss, mask ----
    random_inputs(1);
    bad_par[10] = 1; bad_par[33] = 1;
    lock_bad[20] = 1;
    masked[40] = 1; wr(RA_CHCTRL + 40, 16'h0020);
    apply_inputs();
    check_outputs("errors");
    rdv(RA_ERRCNT + 10, rd);
    checks++; if (rd[11:0] == 0) begin failures++; $display("FAIL parity counter"); end else m_parity++;
    rdv(RA_ERRCNT + N_CH + 20, rd);
    checks++; if (rd[11:0] != 1 || !rd[12]) begin failures++; $display("FAIL lock-loss counter %h", rd); end else m_lock++;
    rdv(RA_ERRCNT + 40, rd);
    checks++; if (rd[11:0] != 0) begin failures++; $display("FAIL masked channel counted"); end else m_mask++;
    rdv(RA_STATUS, rd);
    checks++; if (rd[1:0] != 2'b11) begin failures++; $display("FAIL status %h", rd); end
    // ---- spy memory: static input, any word equals the input ----
    repeat (260) @(posedge clk); #1;          // whole memory rewritten with this pattern
    for (int c = 0; c < N_CH; c += 13) begin
      rdv(RA_SPY_IP + REG_AW'(c), rd);
      checks++;
      if (rd[9:0] !== lvds_data[c]) begin failures++; $display("FAIL spy ch %0d %h exp %h", c, rd, lvds_data[c]); end
      else m_spy++;
    end
    wr(RA_CHCTRL + 40, 16'h0000);
    clear_inputs();
    // ---- FCAL mode ----
    fcal_mode = 1; fcal_col = 7'b0000011;
    wr(RA_FCAL_MODE, 16'd1); wr(RA_FCAL_COL, 16'(fcal_col));
    set_defs(1);
    for (int n = 0; n < 6; n++) begin
      clear_inputs();
      random_inputs(n % 2);
      for (int p = 1; p < 9; p += 3) en[2 * (4 * p)] = 9'(60 + 40 * n);   // eta 0 column (FCAL)
      apply_inputs();
      check_outputs($sformatf("fcal %0d", n));
      if (n == 2) readout(1);
    end
    fcal_mode = 0; fcal_col = '0;
    wr(RA_FCAL_MODE, 16'd0); wr(RA_FCAL_COL, 16'd0);
    set_defs(0);
    // ---- playback: every channel plays its own constant from memory ----
    clear_inputs();
    apply_inputs();
    wr(RA_DIAG, 16'h0006);                    // reset VME pointers, spy on
    for (int c = 0; c < N_CH; c++) begin
      logic [8:0] v;
      v = (c % 5 == 0) ? 9'($urandom % 120) : 9'd0;
      for (int i = 0; i < 256; i++) wr(RA_PLAYBACK + REG_AW'(c), 16'(v));
      en[c] = v;                              // model: playback replaces the input
    end
    wr(RA_DIAG, 16'h0003);                    // playback on
    check_outputs("playback");
    checks++;
    if (esum_out[11:0] == 0) begin failures++; $display("FAIL playback had no effect"); end else m_playback++;
    repeat (260) @(posedge clk); #1;
    rdv(RA_SPY_IP + 5, rd);
    checks++;
    if (rd[9:0] !== {en[5], ~(^en[5])}) begin failures++; $display("FAIL spy in playback %h", rd); end else m_spy++;
    wr(RA_DIAG, 16'h0002);
    clear_inputs();
    // ---- one-slice readout, then TTC not ready ----
    slices = 1; wr(RA_RO_SLICES, 16'd1);
    random_inputs(0); apply_inputs();
    check_outputs("one slice");
    readout(1);
    ttc_ready = 0;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (esum_out !== '0 || hits_out !== '0) begin failures++; $display("FAIL ttc_ready forcing"); end else m_ttc++;
    readout(0);
    ttc_ready = 1;

    $display("mechanisms: dtack=%0d nodtack=%0d esum=%0d esat=%0d xysat=%0d hits=%0d jets=%0d sat7=%0d fcal=%0d",
             m_dtack, m_nodtack, m_esum, m_esat, m_xysat, m_hits, m_jets, m_sat7, m_fcal);
    $display("mechanisms: parity=%0d lock=%0d mask=%0d playback=%0d spy=%0d daq=%0d multislice=%0d roi=%0d ttc=%0d",
             m_parity, m_lock, m_mask, m_playback, m_spy, m_daq, m_multislice, m_roi, m_ttc);
    if (m_dtack == 0 || m_nodtack == 0 || m_esum == 0 || m_esat == 0 || m_xysat == 0 || m_hits == 0 ||
        m_jets == 0 || m_sat7 == 0 || m_fcal == 0 || m_parity == 0 || m_lock == 0 || m_mask == 0 ||
        m_playback == 0 || m_spy == 0 || m_daq == 0 || m_multislice == 0 || m_roi == 0 || m_ttc < 2) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
