// tb_readout_sequencer: feeds a known slice pattern (slice of tick t has
// every field equal to a function of t) into a small sequencer (LATENCY 8,
// 2 streams of 12 bits, GAP 5, tag field of 4 bits), issues read requests
// of 1 to 5 slices, and decodes the serial streams: each slice must be the
// data of the requested tick, MSB first, followed by an odd parity bit;
// the tag must be that of the first slice; packets are separated by at
// least GAP invalid ticks and the first bit appears 3 ticks after the
// request.  Also provokes a FIFO overflow with a 4-deep FIFO variant.
module tb_readout_sequencer;
  localparam int NS = 2, SB = 12, LAT = 8, GAP = 5, TAG = 4;
  logic clk = 0, rst = 1;
  logic [NS*SB-1:0] din;
  logic read_req = 0, rr_first = 0, rr_last = 0;
  logic [NS-1:0] sout;
  logic sout_valid;
  logic [8:0] fifo_count;
  logic overflow;
  int checks = 0, failures = 0;
  int tick = 0;

  readout_sequencer #(.N_STREAM(NS), .SLICE_BITS(SB), .LATENCY(LAT),
                      .FIFO_DEPTH(256), .GAP(GAP), .TAG_W(TAG)) dut (.*);

  // small FIFO instance to check overflow
  logic [0:0] s2; logic v2; logic [2:0] c2; logic ov2;
  logic rq2 = 0;
  readout_sequencer #(.N_STREAM(1), .SLICE_BITS(8), .LATENCY(2), .FIFO_DEPTH(4), .GAP(1), .TAG_W(0)) dut2 (
    .clk, .rst, .din(8'hA5), .read_req(rq2), .rr_first(rq2), .rr_last(rq2),
    .sout(s2), .sout_valid(v2), .fifo_count(c2), .overflow(ov2));

  always #5 clk = ~clk;

  function automatic logic [NS*SB-1:0] pat(input int t);
    logic [SB-1:0] a, b;
    a = SB'(t * 37 + 5);
    b = SB'(t * 91 + 3);
    return {b, a};
  endfunction

  always_ff @(posedge clk) tick <= tick + 1;
  assign din = pat(tick);

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected slices queue (data words in request order) and event marks
  logic [NS*SB-1:0] expq [$];
  int               lastq [$];
  int               req_tick [$];

  // monitor: collect bits
  int  bitpos = 0;
  logic [SB:0] acc [NS];
  int  gap_cnt = 1000;
  int  in_event = 0;
  int  first_bit_seen [$];
  int  events_done = 0;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (sout_valid) begin
        if (bitpos == 0 && in_event == 0) begin
          checks++;
          if (gap_cnt < GAP) begin failures++; $display("FAIL gap %0d", gap_cnt); end
          first_bit_seen.push_back(tick);
          in_event = 1;
        end
        for (int s = 0; s < NS; s++) acc[s] = {acc[s][SB-1:0], sout[s]};
        bitpos++;
        gap_cnt = 0;
        if (bitpos == SB + 1) begin
          logic [NS*SB-1:0] e; int l;
          e = expq.pop_front(); l = lastq.pop_front();
          checks++;
          for (int s = 0; s < NS; s++) begin
            logic [SB-1:0] d; logic p;
            d = acc[s][SB:1]; p = acc[s][0];
            if (d !== e[s*SB +: SB] || (^{d, p}) !== 1'b1) begin
              failures++; $display("FAIL slice s=%0d got %h exp %h p=%b", s, d, e[s*SB +: SB], p);
            end
          end
          bitpos = 0;
          if (l) begin in_event = 0; events_done++; end
        end
      end else begin
        gap_cnt++;
        if (bitpos != 0) begin failures++; $display("FAIL hole inside slice"); bitpos = 0; end
      end
    end
  end

  task automatic request(input int n);
    logic [TAG-1:0] tg;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      read_req = 1; rr_first = (i == 0); rr_last = (i == n - 1);
      // data at the end of the pipeline was entered LAT ticks ago
      begin
        logic [NS*SB-1:0] d;
        d = pat(tick - LAT);
        if (i == 0) tg = d[TAG-1:0];
        d[TAG-1:0] = tg;
        expq.push_back(d); lastq.push_back(i == n - 1);
      end
      if (i == 0) req_tick.push_back(tick);
    end
    @(negedge clk);
    read_req = 0; rr_first = 0; rr_last = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);
    // isolated events
    for (int n = 1; n <= 5; n++) begin
      request(n);
      repeat (100) @(posedge clk);
    end
    // back-to-back events (queued in the FIFO)
    for (int k = 0; k < 10; k++) request(1 + k % 5);
    repeat (1500) @(posedge clk);
    checks++;
    if (events_done != 15 || expq.size() != 0) begin failures++; $display("FAIL events %0d left %0d", events_done, expq.size()); end
    // latency of the first bit for the isolated events
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (first_bit_seen[k] - req_tick[k] != 3) begin
        failures++; $display("FAIL first bit after %0d ticks", first_bit_seen[k] - req_tick[k]);
      end
    end
    // overflow on the small FIFO
    @(negedge clk) rq2 = 1;
    repeat (8) @(negedge clk);
    rq2 = 0;
    checks++;
    if (!ov2) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
