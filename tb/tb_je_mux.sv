// tb_je_mux: a new random jet element is registered on every bunch clock
// edge; the 5-bit line is checked after every clk2x edge: during the first
// half of tick n it must carry the low half of the element registered at
// the start of tick n-1, during the second half its high half.
module tb_je_mux;
  import jem_pkg::*;
  logic clk = 0, clk2x = 0, rst = 1;
  logic bc_toggle = 0;
  je_t  je = '0;
  logic [4:0] dout;
  je_t  hist [0:4095];
  int   n = 0;
  int checks = 0, failures = 0;

  je_mux dut (.clk2x, .bc_toggle, .je, .dout);

  initial forever begin #5 clk2x = ~clk2x; if (clk2x) clk = ~clk; end

  always_ff @(posedge clk) begin
    bc_toggle <= rst ? 1'b0 : ~bc_toggle;
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (n = 0; n < 1000; n++) begin
      @(posedge clk);       // start of tick n: je takes hist[n]
      hist[n] = je_t'($urandom);
      je <= hist[n];
      @(negedge clk2x);     // first half of tick n
      if (n >= 2) begin
        checks++;
        if (dout !== hist[n-1][4:0]) begin failures++; $display("FAIL lo n=%0d %h exp %h", n, dout, hist[n-1][4:0]); end
      end
      @(posedge clk2x); @(negedge clk2x);   // second half of tick n
      if (n >= 2) begin
        checks++;
        if (dout !== hist[n-1][9:5]) begin failures++; $display("FAIL hi n=%0d %h exp %h", n, dout, hist[n-1][9:5]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
