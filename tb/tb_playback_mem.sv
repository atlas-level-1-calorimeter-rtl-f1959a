// tb_playback_mem: fills the memory through the VME port, then checks that
// the real-time port replays the pattern in order, wraps after 256 words,
// stops while disabled and restarts from 0 on the TTC pointer reset.
module tb_playback_mem;
  logic clk = 0, rst = 1;
  logic vme_we = 0, vme_ptr_reset = 0, enable = 0, sync_reset = 0;
  logic [8:0] vme_wdata = '0, rt_data;
  logic [8:0] pat [256];
  int checks = 0, failures = 0;

  playback_mem #(.DEPTH(256), .WIDTH(9)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // write 10 junk words, reset pointer, then the real pattern
    for (int i = 0; i < 10; i++) begin vme_we = 1; vme_wdata = 9'h1AA; @(posedge clk); #1; end
    vme_we = 0; vme_ptr_reset = 1; @(posedge clk); #1 vme_ptr_reset = 0;
    for (int i = 0; i < 256; i++) begin
      pat[i] = 9'($urandom);
      vme_we = 1; vme_wdata = pat[i]; @(posedge clk); #1;
    end
    vme_we = 0;
    sync_reset = 1; @(posedge clk); #1 sync_reset = 0;
    enable = 1;
    // pointer 0 now; rt_data shows mem[ptr] one cycle later
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      checks++;
      if (rt_data !== pat[i % 256]) begin failures++; $display("FAIL i=%0d %h exp %h", i, rt_data, pat[i % 256]); end
    end
    // hold
    enable = 0;
    @(posedge clk); #1;
    begin
      logic [8:0] h; h = rt_data;
      repeat (5) @(posedge clk); #1;
      checks++;
      if (rt_data !== h) begin failures++; $display("FAIL hold"); end
    end
    // realign
    sync_reset = 1; @(posedge clk); #1 sync_reset = 0; enable = 1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      checks++;
      if (rt_data !== pat[i]) begin failures++; $display("FAIL realign i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
