// tb_spy_mem: captures 300 ticks of random data in spy mode (the last 256
// remain, with the pointer aligned by the TTC reset), reads them back
// through the auto-incrementing VME port, and checks that nothing is
// written while spy mode is off.
module tb_spy_mem;
  logic clk = 0, rst = 1;
  logic enable = 0, sync_reset = 0, vme_rd = 0, vme_ptr_reset = 0;
  logic [24:0] rt_data = '0, vme_rdata;
  logic [24:0] hist [300];
  int checks = 0, failures = 0;

  spy_mem #(.DEPTH(256), .WIDTH(25)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    sync_reset = 1; @(posedge clk); #1 sync_reset = 0;
    enable = 1;
    for (int i = 0; i < 300; i++) begin
      hist[i] = 25'($urandom); rt_data = hist[i]; @(posedge clk); #1;
    end
    enable = 0;
    for (int i = 0; i < 20; i++) begin rt_data = 25'($urandom); @(posedge clk); #1; end
    vme_ptr_reset = 1; @(posedge clk); #1 vme_ptr_reset = 0;
    // location a holds hist[256 + a] for a < 44, hist[a] otherwise
    for (int a = 0; a < 256; a++) begin
      logic [24:0] e;
      e = (a < 44) ? hist[256 + a] : hist[a];
      checks++;
      if (vme_rdata !== e) begin failures++; $display("FAIL a=%0d %h exp %h", a, vme_rdata, e); end
      vme_rd = 1; @(posedge clk); #1 vme_rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
