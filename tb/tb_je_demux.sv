// tb_je_demux: drives the 5-bit line as a transmitter would (low half of
// element n during the first half of tick n, high half during the second)
// and checks that a bunch-clock register fed by the demultiplexer holds
// element n after the clock edge that starts tick n+2.
module tb_je_demux;
  import jem_pkg::*;
  logic clk = 0, clk2x = 0, rst = 1;
  logic bc_toggle = 0;
  logic [4:0] din = '0;
  je_t  je, je40;
  je_t  hist [0:4095];
  int checks = 0, failures = 0;

  je_demux dut (.clk2x, .bc_toggle, .din, .je);

  initial forever begin #5 clk2x = ~clk2x; if (clk2x) clk = ~clk; end

  always_ff @(posedge clk) begin
    bc_toggle <= rst ? 1'b0 : ~bc_toggle;
    je40 <= je;
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk); #1;   // tick n
      hist[n] = je_t'($urandom);
      din = hist[n][4:0];
      if (n >= 4) begin
        checks++;
        if (je40 !== hist[n-2]) begin failures++; $display("FAIL n=%0d %h exp %h", n, je40, hist[n-2]); end
      end
      @(posedge clk2x); #1;   // middle of tick n
      din = hist[n][9:5];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
