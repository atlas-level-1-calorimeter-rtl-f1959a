// tb_readout_controller: for offsets 0..63 and slice counts 0..7 sends an
// L1A and checks that ReadRequest rises exactly offset+2 ticks later and
// stays high for the clamped number of slices (1..5) with rr_first/rr_last
// on the first/last tick; checks the bunch counter against a model
// (cleared by bcnt_res) and the link word: data masked by valid, dav, and
// everything forced to zero while the TTC is not ready.
module tb_readout_controller;
  logic clk = 0, rst = 1;
  logic l1a = 0, bcnt_res = 0, ttc_ready = 1;
  logic [5:0] offset = '0;
  logic [2:0] n_slices = 3'd1;
  logic read_req, rr_first, rr_last;
  logic [11:0] bcn;
  logic [3:0] stream = '0, stream_valid = '0, link_data;
  logic link_dav;
  int checks = 0, failures = 0;
  int m_bcn = 0;

  readout_controller #(.N_IN(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // bunch counter model
  always @(posedge clk) begin
    if (rst) m_bcn <= 0;
    else     m_bcn <= bcnt_res ? 0 : (m_bcn + 1) % 4096;
  end
  always @(negedge clk) if (!rst) begin
    checks++;
    if (int'(bcn) != m_bcn) begin failures++; $display("FAIL bcn %0d exp %0d", bcn, m_bcn); end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int off = 0; off < 64; off += 7) begin
      for (int ns = 0; ns < 8; ns++) begin
        int nexp, cnt;
        nexp = (ns == 0) ? 1 : (ns > 5) ? 5 : ns;
        offset = 6'(off); n_slices = 3'(ns);
        @(negedge clk) l1a = 1;
        @(negedge clk) l1a = 0;
        // the L1A tick was sampled at the edge before this negedge; rr must
        // rise off+2 ticks after that tick
        for (int t = 1; t < off + 2; t++) begin
          checks++;
          if (read_req) begin failures++; $display("FAIL early rr off=%0d t=%0d", off, t); end
          @(negedge clk);
        end
        cnt = 0;
        while (read_req && cnt < 10) begin
          checks++;
          if (rr_first !== (cnt == 0) || rr_last !== (cnt == nexp - 1)) begin
            failures++; $display("FAIL marks off=%0d ns=%0d cnt=%0d", off, ns, cnt);
          end
          cnt++;
          @(negedge clk);
        end
        checks++;
        if (cnt != nexp) begin failures++; $display("FAIL length off=%0d ns=%0d got %0d", off, ns, cnt); end
        repeat (3) @(negedge clk);
      end
    end
    // bunch counter reset
    @(negedge clk) bcnt_res = 1;
    @(negedge clk) bcnt_res = 0;
    repeat (5) @(negedge clk);
    // link word
    for (int i = 0; i < 200; i++) begin
      logic [3:0] s, v; logic rdy;
      s = 4'($urandom); v = (i % 5 == 0) ? 4'h0 : 4'($urandom); rdy = (i % 7 != 3);
      stream = s; stream_valid = v; ttc_ready = rdy;
      @(negedge clk);
      checks++;
      if (link_dav !== (rdy && |v) || link_data !== ((rdy && |v) ? (s & v) : 4'h0)) begin
        failures++; $display("FAIL link i=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
