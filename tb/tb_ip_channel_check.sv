// tb_ip_channel_check: random words with good and bad parity, random lock
// and mask; compares the zeroed energy and both error counters with a
// model, then drives 4200 parity errors to check counter saturation at
// 4095 and the VME clear.
module tb_ip_channel_check;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] din = '0;
  logic lock_n = 0, mask = 0, cnt_clear = 0;
  logic [8:0] energy;
  logic par_err, link_down;
  logic [11:0] par_err_cnt, lock_loss_cnt;
  int checks = 0, failures = 0;

  ip_channel_check #(.CNT_W(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [9:0] mkword(input logic [8:0] e, input logic bad);
    logic p;
    p = 1'b1;
    for (int i = 0; i < 9; i++) p ^= e[i];   // odd parity: total ones odd
    return {e, p ^ bad};
  endfunction

  int m_pe = 0, m_ll = 0;
  logic m_prev_lock = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [8:0] e; logic bad, lk, mk;
      logic [8:0] exp_e;
      e = 9'($urandom); bad = ($urandom % 4) == 0; lk = ($urandom % 8) == 0; mk = ($urandom % 10) == 0;
      din = mkword(e, bad); lock_n = lk; mask = mk;
      exp_e = (mk || lk || bad) ? 9'd0 : e;
      if (!mk) begin
        if (bad && !lk && m_pe < 4095) m_pe++;
        if (lk && !m_prev_lock && m_ll < 4095) m_ll++;
      end
      m_prev_lock = lk;
      @(posedge clk); #1;
      checks++;
      if (energy !== exp_e || par_err_cnt !== 12'(m_pe) || lock_loss_cnt !== 12'(m_ll) || link_down !== lk) begin
        failures++;
        $display("FAIL n=%0d e=%h exp=%h pe=%0d/%0d ll=%0d/%0d", n, energy, exp_e, par_err_cnt, m_pe, lock_loss_cnt, m_ll);
      end
    end
    // clear
    cnt_clear = 1; @(posedge clk); #1 cnt_clear = 0;
    checks++;
    if (par_err_cnt !== 0 || lock_loss_cnt !== 0) begin failures++; $display("FAIL clear"); end
    // saturation
    lock_n = 0; mask = 0;
    for (int n = 0; n < 4200; n++) begin
      din = mkword(9'($urandom), 1'b1);
      @(posedge clk); #1;
    end
    checks++;
    if (par_err_cnt !== 12'hFFF) begin failures++; $display("FAIL saturation %0d", par_err_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
