// tb_vme_interface: performs VME write and read cycles (random address and
// data) against a behavioural register file attached to the local bus.  It
// checks that a cycle in the module's window (A[23:18] = GEOADD) acknowledges
// exactly 4 ticks after DS0* falls, issues exactly one write or read strobe
// with the right address and data, returns read data with the data enable,
// and releases DTACK* after DS0* rises; that accesses to unmapped addresses
// in the window are acknowledged without a strobe; and that accesses to other
// windows are ignored.
module tb_vme_interface;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] geoadd = 6'd13;
  logic [23:1] vme_a = '0;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_ds0_n = 1, vme_write_n = 1, vme_dtack_n;
  logic [REG_AW-1:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic bus_we, bus_re;
  logic [15:0] regs [0:2047];
  int checks = 0, failures = 0, n_we = 0, n_re = 0;

  vme_interface dut (.*);
  always #5 clk = ~clk;
  assign bus_rdata = regs[bus_addr];
  always @(posedge clk) begin
    if (bus_we) begin regs[bus_addr] <= bus_wdata; n_we++; end
    if (bus_re) n_re++;
  end
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cycle(input logic [23:1] a, input logic wr, input logic [15:0] d,
                       input bit expect_ack, input bit mapped, output logic [15:0] rd);
    int t, w0, r0;
    w0 = n_we; r0 = n_re;
    vme_a = a; vme_write_n = !wr; vme_d_in = d;
    @(posedge clk); #2 vme_ds0_n = 0;
    t = 0;
    while (vme_dtack_n && t < 12) begin @(posedge clk); #1; t++; end
    checks++;
    if (expect_ack && t != 4) begin failures++; $display("FAIL dtack after %0d ticks", t); end
    if (!expect_ack && t != 12) begin failures++; $display("FAIL ack outside window"); end
    rd = vme_d_out;
    checks++;
    if (expect_ack && vme_d_oe !== !wr) begin failures++; $display("FAIL d_oe"); end
    vme_ds0_n = 1;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (vme_dtack_n !== 1 || vme_d_oe !== 0) begin failures++; $display("FAIL release"); end
    checks++;
    if ((n_we - w0) != ((expect_ack && mapped && wr) ? 1 : 0) ||
        (n_re - r0) != ((expect_ack && mapped && !wr) ? 1 : 0)) begin
      failures++; $display("FAIL strobe count");
    end
  endtask

  initial begin
    logic [15:0] model [0:2047];
    logic [15:0] rd;
    for (int i = 0; i < 2048; i++) begin regs[i] = 16'(i * 7); model[i] = 16'(i * 7); end
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      logic [10:0] ra; logic wr; logic [15:0] d; int kind;
      ra = 11'($urandom); wr = $urandom % 2; d = 16'($urandom);
      kind = $urandom % 8;
      if (kind == 0)       cycle({6'(geoadd + 1), 6'd0, ra}, wr, d, 0, 0, rd);
      else if (kind == 1)  cycle({geoadd, 6'd5, ra}, wr, d, 1, 0, rd);
      else begin
        cycle({geoadd, 6'd0, ra}, wr, d, 1, 1, rd);
        if (wr) model[ra] = d;
        else begin
          checks++;
          if (rd !== model[ra]) begin failures++; $display("FAIL read %h: %h exp %h", ra, rd, model[ra]); end
        end
      end
      if (kind == 1 && !wr) begin checks++; if (rd !== 0) begin failures++; $display("FAIL unmapped read"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
