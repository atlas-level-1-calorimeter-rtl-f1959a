// tb_jet_algorithm: drives one random 7 x 11 jet-element environment per tick
// (sparse peaks, flat plateaus that create ties, saturated elements, all-
// nonzero fields, one isolated peak per subregion that overflows the multiplicity counters) with random jet
// definitions, and compares hits and RoI records 3 ticks later against a
// reference model.  The model computes every cluster sum directly from the
// elements and decides local maxima by a linear ordering of the 2x2
// positions (a neighbour earlier in (eta, phi) order must be strictly
// smaller, a later one smaller or equal), which is the rule the design
// states.  Central and FCAL modes are both exercised and counted.
module tb_jet_algorithm;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  je_t je [ENV_ETA][ENV_PHI];
  logic [ENV_ETA-1:0] fcal_col = '0;
  logic fcal_mode = 0;
  jet_def_t defs [8];
  jet_def_t fcal_defs [4];
  logic [23:0] hits;
  roi_t roi_c [8];
  roi_t roi_f [8];
  int checks = 0, failures = 0;
  int n_fcal = 0, n_sat7 = 0, n_roi = 0, n_satroi = 0, n_ties = 0;

  jet_algorithm dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int csum(input je_t j [ENV_ETA][ENV_PHI], input int e, input int p, input int n, output bit sat);
    int a; a = 0; sat = 0;
    for (int i = 0; i < n; i++) for (int k = 0; k < n; k++) begin
      a += int'(j[e+i][p+k]);
      if (j[e+i][p+k] == JE_SAT) sat = 1;
    end
    return a;
  endfunction

  typedef struct { logic [23:0] hits; roi_t c [8]; roi_t f [8]; } res_t;

  function automatic res_t model(input je_t j [ENV_ETA][ENV_PHI], input logic [ENV_ETA-1:0] fc,
                                 input logic fm, input jet_def_t d8 [8], input jet_def_t d4 [4]);
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
          if (v == w && v != 0) n_ties++;
        end
        if (lm) begin found = 1; me = ce; mp = cp; mq = q; end
      end
      if (found) begin
        bit isf, s2, s4, s3, ok;
        int v2, v4;
        roi_t ro;
        isf = fm && (fc[me] || fc[me+1]);
        v2 = csum(j, me, mp, 2, s2);
        v4 = csum(j, me - 1, mp - 1, 4, s4);
        ro.sat = s4; ro.pos = 2'(mq); ro.thr_hits = '0;
        for (int d = 0; d < (isf ? 4 : 8); d++) begin
          jet_def_t df;
          df = isf ? d4[d] : d8[d];
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
    if (!fm) for (int d = 0; d < 8; d++) r.hits[3*d +: 3] = 3'((cc[d] > 7) ? 7 : cc[d]);
    else begin
      for (int d = 0; d < 8; d++) r.hits[2*d +: 2] = 2'((cc[d] > 3) ? 3 : cc[d]);
      for (int d = 0; d < 4; d++) r.hits[16 + 2*d +: 2] = 2'((fcn[d] > 3) ? 3 : fcn[d]);
    end
    return r;
  endfunction

  res_t expq [0:4095];

  initial begin
    for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++) je[e][p] = '0;
    for (int d = 0; d < 8; d++) defs[d] = '{CL_2X2, 10'h3FF};
    for (int d = 0; d < 4; d++) fcal_defs[d] = '{CL_2X2, 10'h3FF};
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      int kind;
      if (n % 100 == 0) begin   // new configuration (static during a run)
        for (int d = 0; d < 8; d++)
          defs[d] = '{cluster_size_e'($urandom % 3), (d == 7 && n % 300 == 0) ? 10'h3FF : 10'($urandom % 200)};
        for (int d = 0; d < 4; d++) fcal_defs[d] = '{cluster_size_e'($urandom % 3), 10'($urandom % 200)};
        fcal_mode = (n / 100) % 3 == 2;
        fcal_col = fcal_mode ? (($urandom % 2) ? 7'b1100000 : 7'b0000011) : 7'($urandom);
        repeat (4) @(posedge clk); #1;
      end
      kind = $urandom % 6;
      for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++)
        case (kind)
          0: je[e][p] = ($urandom % 8 == 0) ? je_t'($urandom % 256) : '0;
          1: je[e][p] = je_t'($urandom % 3);           // plateaus and ties
          2: je[e][p] = je_t'(20 + $urandom % 60);      // everything passes
          5: je[e][p] = (e % 2 == 0 && e > 0 && e < 5 && p % 2 == 0 && p > 0 && p < 9) ? je_t'(500) : je_t'($urandom % 2);
          3: je[e][p] = ($urandom % 40 == 0) ? JE_SAT : je_t'($urandom % 16);
          default: je[e][p] = je_t'($urandom % 1024);
        endcase
      expq[n] = model(je, fcal_col, fcal_mode, defs, fcal_defs);
      if (fcal_mode) n_fcal++;
      @(posedge clk); #1;
      // outputs of vector n-2 are now valid (input sampled at the edge ending vector n)
      if (n >= 2 && (n % 100) >= 2) begin
        res_t x; bit bad;
        x = expq[n-2];
        checks++;
        bad = hits !== x.hits;
        for (int k = 0; k < 8; k++) begin
          if (roi_c[k] !== x.c[k] || roi_f[k] !== x.f[k]) bad = 1;
          if (x.c[k].thr_hits != 0 || x.f[k].thr_hits != 0) n_roi++;
          if (x.c[k].sat || x.f[k].sat) n_satroi++;
        end
        for (int d = 0; d < 8; d++) if (!fcal_mode && x.hits[3*d +: 3] == 3'd7) n_sat7++;
        if (bad) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d kind=%0d hits %h exp %h", n - 2, kind, hits, x.hits);
        end
      end
    end
    $display("fcal=%0d sat7=%0d roi=%0d satroi=%0d ties=%0d", n_fcal, n_sat7, n_roi, n_satroi, n_ties);
    if (n_fcal == 0 || n_sat7 == 0 || n_roi == 0 || n_satroi == 0 || n_ties == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
