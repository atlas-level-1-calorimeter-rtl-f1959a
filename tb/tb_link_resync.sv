// tb_link_resync: sends packets of 1..335 valid link words (up to five
// 67-bit slices), separated by 20 or more idle words, from a write clock
// into a read clock that is first 1 % faster and then 1 % slower (five times
// the real bunch/crystal mismatch).  The reader re-assembles packets from
// consecutive dav words and checks each against the sent one: same words,
// same order, no fill frame inside a packet, no overflow, and every packet
// received.
module tb_link_resync;
  localparam int W = 16;
  logic wclk = 0, rclk = 0, wrst = 1;
  logic [W-1:0] din = '0, dout;
  logic din_dav = 0, dout_dav, overflow;
  int rh = 99;
  int checks = 0, failures = 0;

  link_resync #(.W(W), .DEPTH(16)) dut (.*);
  initial forever #100 wclk = ~wclk;
  initial forever #(rh) rclk = ~rclk;
  initial begin
    #400000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] sent [$];
  int plen [$];
  int n_rx = 0;

  // receiver
  initial begin
    int cur;
    cur = 0;
    forever begin
      @(posedge rclk); #1;
      if (dout_dav) begin
        checks++;
        if (sent.size() == 0 || dout !== sent[0]) begin
          failures++;
          if (failures < 10) $display("FAIL word %h exp %h", dout, (sent.size() > 0) ? sent[0] : 16'h0);
        end
        if (sent.size() > 0) void'(sent.pop_front());
        cur++;
      end else if (cur > 0) begin
        checks++;
        if (plen.size() == 0 || cur != plen[0]) begin
          failures++; $display("FAIL packet length %0d exp %0d", cur, (plen.size() > 0) ? plen[0] : -1);
        end
        if (plen.size() > 0) void'(plen.pop_front());
        cur = 0; n_rx++;
      end
    end
  end

  task automatic send_packets(input int n);
    for (int k = 0; k < n; k++) begin
      int len, gap;
      len = (k % 4 == 0) ? 335 : 1 + $urandom % 335;
      gap = 20 + $urandom % 30;
      plen.push_back(len);
      for (int i = 0; i < len; i++) begin
        @(posedge wclk); #1 din_dav = 1; din = W'($urandom);
        sent.push_back(din);
      end
      for (int i = 0; i < gap; i++) begin @(posedge wclk); #1 din_dav = 0; din = '0; end
    end
  endtask

  initial begin
    int total;
    repeat (4) @(posedge wclk); #1 wrst = 0;
    repeat (40) @(posedge wclk);
    send_packets(40);               // read clock faster
    rh = 101;
    repeat (40) @(posedge wclk);
    send_packets(40);               // read clock slower
    repeat (200) @(posedge wclk);
    total = 80;
    checks++;
    if (n_rx != total || sent.size() != 0) begin failures++; $display("FAIL received %0d packets of %0d", n_rx, total); end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
