// tb_jet_input_cond: random 7 x 11 element fields with random noise
// threshold, FCAL column mask and copy-from-below rows; checks the output one
// tick later against a model: elements below the threshold are zeroed, FCAL
// columns are halved (saturation kept) and, on flagged rows, take the halved
// value of the row below.  Checks reset to zero as well.
module tb_jet_input_cond;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  je_t din [ENV_ETA][ENV_PHI];
  je_t dout [ENV_ETA][ENV_PHI];
  je_t thr = '0;
  logic [ENV_ETA-1:0] fcal_col = '0;
  logic [ENV_PHI-1:0] copy_from_below = '0;
  int checks = 0, failures = 0, n_sat = 0, n_copy = 0;

  jet_input_cond dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    je_t exp [ENV_ETA][ENV_PHI];
    for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++) din[e][p] = je_t'(e + p + 1);
    @(posedge clk); #1;
    for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++) begin
      checks++; if (dout[e][p] !== '0) failures++;
    end
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      thr = je_t'($urandom % 64);
      fcal_col = 7'($urandom);
      copy_from_below = 11'($urandom);
      for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++)
        din[e][p] = ($urandom % 20 == 0) ? JE_SAT : je_t'($urandom % 256);
      for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++) begin
        je_t v; int src;
        src = (fcal_col[e] && copy_from_below[p] && p > 0) ? p - 1 : p;
        v = (din[e][src] < thr) ? je_t'(0) : din[e][src];
        if (fcal_col[e]) begin
          if (src != p) n_copy++;
          if (v == JE_SAT) n_sat++; else v = v / 2;
        end
        exp[e][p] = v;
      end
      @(posedge clk); #1;
      for (int e = 0; e < ENV_ETA; e++) for (int p = 0; p < ENV_PHI; p++) begin
        checks++;
        if (dout[e][p] !== exp[e][p]) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d p=%0d %h exp %h", e, p, dout[e][p], exp[e][p]);
        end
      end
    end
    if (n_sat == 0 || n_copy == 0) begin failures++; $display("FAIL not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
