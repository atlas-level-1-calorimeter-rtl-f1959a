// tb_sum_processor: (1) streams random pre-sums of three input processors,
// including saturated Et inputs and Ex/Ey overflows, and checks the 25-bit
// merger word four ticks later against a model of addition, LSB cut,
// saturation, quad-linear coding and odd parity; (2) checks that the
// output is forced to zero while the TTC is not ready; (3) reads out a
// 3-slice event and checks the DAQ stream on link bit 15: three 67-bit
// slices {hits, esum, 0, bcn} with odd parity, all carrying the bunch number
// of the first slice, and invalid IP streams masked to zero on bits 0..14.
module tb_sum_processor;
  import jem_pkg::*;
  localparam int LAT = 8;
  logic clk = 0, rst = 1;
  logic [11:0] et_in [3];
  logic signed [13:0] ex_in [3];
  logic signed [13:0] ey_in [3];
  logic [24:0] jet_hits = '0, esum_out;
  logic ttc_ready = 1, l1a = 0, bcnt_res = 0, sync_reset = 0;
  logic [5:0] ro_offset = '0;
  logic [2:0] ro_slices = 3'd3;
  logic read_req, rr_first, rr_last;
  logic [14:0] ip_stream = '0, ip_stream_valid = '0;
  logic [15:0] daq_link;
  logic daq_dav;
  logic spy_en = 0, spy_rd = 0, spy_ptr_reset = 0;
  logic [24:0] spy_rdata;
  int checks = 0, failures = 0;
  int n_et_sat = 0, n_xy_sat = 0;

  sum_processor #(.LATENCY(LAT), .FIFO_DEPTH(16), .GAP(20), .N_IP_STR(15)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] enc_u(input int v);
    if (v < 64)   return {2'd0, 6'(v)};
    if (v < 256)  return {2'd1, 6'(v / 4)};
    if (v < 1024) return {2'd2, 6'(v / 16)};
    return {2'd3, 6'(v / 64)};
  endfunction
  function automatic logic [7:0] enc_s(input int v);   // v in -2048..2047
    int m, sc;
    m = (v < 0) ? -v - 1 : v;
    sc = (m < 32) ? 0 : (m < 128) ? 1 : (m < 512) ? 2 : 3;
    return {2'(sc), 6'(v >>> (2 * sc))};
  endfunction
  function automatic int fdiv4(input int v);   // floor(v / 4)
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  logic [24:0] expq [0:999];

  initial begin
    for (int i = 0; i < 3; i++) begin et_in[i] = '0; ex_in[i] = '0; ey_in[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 500; n++) begin
      int se, sx, sy; logic sat;
      logic [23:0] w;
      se = 0; sx = 0; sy = 0; sat = 0;
      for (int i = 0; i < 3; i++) begin
        et_in[i] = (n % 11 == 0 && i == 1) ? 12'hFFF : (n % 4 == 0) ? 12'($urandom % 4096) : 12'($urandom % 900);
        ex_in[i] = (n % 9 == 0) ? 14'sd8191 : 14'($urandom);
        ey_in[i] = (n % 9 == 1) ? -14'sd8192 : 14'($urandom);
        se += int'(et_in[i]); sx += int'(ex_in[i]); sy += int'(ey_in[i]);
        if (et_in[i] == 12'hFFF) sat = 1;
      end
      sx = fdiv4(sx); sy = fdiv4(sy);
      if (sat || se > 4095) begin se = 4095; n_et_sat++; end
      if (sx > 2047 || sx < -2048 || sy > 2047 || sy < -2048) n_xy_sat++;
      sx = (sx > 2047) ? 2047 : (sx < -2048) ? -2048 : sx;
      sy = (sy > 2047) ? 2047 : (sy < -2048) ? -2048 : sy;
      w = {enc_s(sy), enc_s(sx), enc_u(se)};
      expq[n] = {~(^w), w};
      @(posedge clk); #1;
      if (n >= 4) begin
        checks++;
        if (esum_out !== expq[n-3]) begin failures++; $display("FAIL n=%0d %h exp %h", n, esum_out, expq[n-3]); end
      end
    end
    if (n_et_sat == 0 || n_xy_sat == 0) begin failures++; $display("FAIL saturation not exercised"); end
    // TTC not ready
    ttc_ready = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (esum_out !== '0) begin failures++; $display("FAIL ttc_ready"); end
    ttc_ready = 1;
    // DAQ readout of a 3-slice event
    for (int i = 0; i < 3; i++) begin et_in[i] = 12'd100; ex_in[i] = '0; ey_in[i] = '0; end
    jet_hits = 25'h1ABCDEF;
    ip_stream = 15'h5A5A; ip_stream_valid = 15'h0;
    repeat (20) @(posedge clk); #1;
    l1a = 1; @(posedge clk); #1 l1a = 0;
    begin
      logic [66:0] sl [3];
      int got, b, k;
      got = 0; b = 0; k = 0;
      while (got < 3 && k < 1000) begin
        @(posedge clk); #1; k++;
        if (daq_dav) begin
          sl[got] = {sl[got][65:0], daq_link[15]};
          checks++;
          if (daq_link[14:0] !== 15'h0) begin failures++; $display("FAIL invalid IP streams not masked"); end
          if (++b == 67) begin b = 0; got++; end
        end
      end
      checks++;
      if (got != 3) begin failures++; $display("FAIL got %0d slices", got); end
      else begin
        for (int s = 0; s < 3; s++) begin
          checks++;
          if (sl[s][66:42] !== 25'h1ABCDEF || (^sl[s]) !== 1'b1 || sl[s][12:1] !== sl[0][12:1]
              || sl[s][16:13] !== 4'b0) begin
            failures++; $display("FAIL slice %0d = %h", s, sl[s]);
          end
        end
        // esum field: Et = 300 -> code {10, 300/16=18}, Ex = Ey = 0
        checks++;
        if (sl[0][40:17] !== {8'h00, 8'h00, 2'b10, 6'd18} || sl[0][41] !== ~(^{8'h00, 8'h00, 2'b10, 6'd18})) begin
          failures++; $display("FAIL esum field %h", sl[0][41:17]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
