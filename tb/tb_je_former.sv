// tb_je_former: exhaustive-ish check of the em + had sum, including the
// saturation rule (either input at 0x1FF gives 0x3FF).
module tb_je_former;
  logic clk = 0, rst = 1;
  logic [8:0] em = '0, had = '0;
  logic [9:0] je;
  int checks = 0, failures = 0;

  je_former dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [9:0] e;
      case (i % 10)
        0: begin em = 9'h1FF; had = 9'($urandom); end
        1: begin had = 9'h1FF; em = 9'($urandom); end
        2: begin em = 9'h1FE; had = 9'h1FE; end
        default: begin em = 9'($urandom); had = 9'($urandom); end
      endcase
      e = (em == 9'h1FF || had == 9'h1FF) ? 10'h3FF : {1'b0, em} + {1'b0, had};
      @(posedge clk); #1;
      checks++;
      if (je !== e) begin failures++; $display("FAIL em=%h had=%h je=%h exp=%h", em, had, je, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
