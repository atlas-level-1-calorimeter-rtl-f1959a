// tb_jet_processor: drives the 77 jet-element lines (44 local, 11 from the
// left-hand and 22 from the right-hand neighbour) as 5-bit halves at twice
// the bunch clock, low half first.  A single energy peak is moved over every
// position of the 7 x 11 environment; with one 2x2 and one 4x4 definition a
// jet must be counted exactly when the earliest 2x2 cluster containing the
// peak (which owns it under the tie rule) is a core cluster,
// which checks the line-to-environment mapping, the demultiplexers and the
// output parity.  Also checks that FCAL columns halve the peak (2x2 jet lost
// at threshold 50), that the noise threshold removes small elements, that
// ttc_ready low forces the output to zero, and that an L1A produces one
// 45-bit RoI slice on the central and bunch-number lines.
module tb_jet_processor;
  import jem_pkg::*;
  logic clk = 0, clk2x = 0, rst = 1, bc_toggle;
  logic [HALF_W-1:0] je_local [N_JE];
  logic [HALF_W-1:0] fio_from_right [2*ENV_PHI];
  logic [HALF_W-1:0] fio_from_left [ENV_PHI];
  je_t thr_jet = '0;
  logic [ENV_ETA-1:0] fcal_col = '0;
  logic [ENV_PHI-1:0] copy_from_below = '0;
  logic fcal_mode = 0;
  jet_def_t defs [8];
  jet_def_t fcal_defs [4];
  logic ttc_ready = 1, l1a = 0, bcnt_res = 0, sync_reset = 0;
  logic [5:0] ro_offset = 6'd1;
  logic [MERGE_W-1:0] hits_out, spy_rdata;
  logic [4:0] roi_link;
  logic roi_dav;
  logic spy_en = 0, spy_rd = 0, spy_ptr_reset = 0;
  int checks = 0, failures = 0, n_jets = 0;

  jet_processor #(.LATENCY(8), .FIFO_DEPTH(16), .GAP(20)) dut (.*);
  initial forever begin #5 clk2x = ~clk2x; if (clk2x) clk = ~clk; end
  always_ff @(posedge clk) bc_toggle <= rst ? 1'b0 : ~bc_toggle;
  initial begin
    #4000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  je_t env [ENV_ETA][ENV_PHI];
  task automatic drive(input bit hi);
    for (int p = 0; p < ENV_PHI; p++) begin
      fio_from_left[p] = hi ? env[0][p][9:5] : env[0][p][4:0];
      for (int e = 0; e < 4; e++) je_local[4*p + e] = hi ? env[1+e][p][9:5] : env[1+e][p][4:0];
      for (int k = 0; k < 2; k++) fio_from_right[2*p + k] = hi ? env[5+k][p][9:5] : env[5+k][p][4:0];
    end
  endtask
  initial forever begin
    @(posedge clk); #1 drive(0);
    @(posedge clk2x); #1 drive(1);
  end

  task automatic clear;
    for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++) env[e][p] = '0;
  endtask
  task automatic expect_hits(input logic [23:0] h, input string what);
    repeat (12) @(posedge clk); #2;
    checks++;
    if (hits_out !== {~(^h), h}) begin failures++; $display("FAIL %s: %h exp %h", what, hits_out, {~(^h), h}); end
  endtask

  initial begin
    clear();
    for (int d = 0; d < 8; d++) defs[d] = '{CL_2X2, 10'h3FF};
    for (int d = 0; d < 4; d++) fcal_defs[d] = '{CL_2X2, 10'h3FF};
    defs[0] = '{CL_2X2, 10'd50};
    defs[1] = '{CL_4X4, 10'd50};
    repeat (4) @(posedge clk); #1 rst = 0;
    for (int e = 0; e < ENV_ETA; e++)
      for (int p = 0; p < ENV_PHI; p++) begin
        bit in2, in4;
        clear(); env[e][p] = 10'd100 + 10'(e * 11 + p);
        in2 = (e >= 2 && e <= 5 && p >= 2 && p <= 9);   // owner: earliest cluster (e-1, p-1)
        expect_hits(in2 ? 24'o11 : 24'o0, $sformatf("peak at %0d,%0d", e, p));
        if (in2) n_jets++;
      end
    // noise threshold
    clear(); env[2][3] = 10'd60; thr_jet = 10'd61;
    expect_hits(24'o0, "below noise threshold");
    thr_jet = 10'd60;
    expect_hits(24'o11, "at noise threshold");
    // FCAL column halving
    fcal_col = 7'b0000100;
    expect_hits(24'o0, "fcal halved");
    fcal_col = '0; env[2][3] = 10'd200;
    // RoI readout
    repeat (20) @(posedge clk); #1 l1a = 1; @(posedge clk); #1 l1a = 0;
    begin
      int nr, t;
      logic [44:0] c0, b;
      nr = 0; t = 0;
      while (t < 150) begin
        @(posedge clk); #1; t++;
        if (roi_dav) begin nr++; c0 = {c0[43:0], roi_link[0]}; b = {b[43:0], roi_link[2]}; end
      end
      checks++;
      if (nr != 45 || ^c0 !== 1'b1 || ^b !== 1'b1 || c0[44:1] == '0) begin
        failures++; $display("FAIL RoI slice nr=%0d c0=%h", nr, c0);
      end
    end
    // TTC not ready
    ttc_ready = 0;
    repeat (3) @(posedge clk); #2;
    checks++;
    if (hits_out !== '0) begin failures++; $display("FAIL ttc_ready"); end
    checks++;
    if (n_jets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
