// tb_ip_channel_sync: checks sample selection (rising vs falling edge),
// the whole-tick delay and the alignment of the lock bit.  In stimulus cycle
// n the data line carries A[n] during the first half of the period and B[n]
// during the second, so the falling-edge sample sees A[n] and the next
// rising-edge sample sees B[n].  The falling-edge sample is thus half a
// period newer: after rising edge m with delay d, the output holds A[m-d-1]
// (phase 1) or B[m-d-2] (phase 0) and the lock bit of cycle m-d-2.
module tb_ip_channel_sync;
  logic clk = 0, rst = 1;
  logic [9:0] din = '0;
  logic lock_n = 0, phase_sel = 0;
  logic [3:0] delay = '0;
  logic [9:0] dout;
  logic lock_n_out;
  int checks = 0, failures = 0;

  ip_channel_sync #(.W(10), .MAX_DELAY(16)) dut (.*);

  always #5 clk = ~clk;

  logic [9:0] hA [0:999];
  logic [9:0] hB [0:999];
  logic       hL [0:999];

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst = 0;
    n = 0;
    for (int ph = 0; ph < 2; ph++) begin
      for (int dl = 0; dl < 16; dl += 5) begin
        phase_sel = ph[0]; delay = dl[3:0];
        for (int k = 0; k < 40; k++) begin
          hA[n] = 10'($urandom); hB[n] = 10'($urandom); hL[n] = 1'($urandom);
          #1 din = hA[n]; lock_n = hL[n];
          @(negedge clk); #1 din = hB[n];
          @(posedge clk);
          #2;
          if (k >= 20) begin
            logic [9:0] e;
            e = ph ? hA[n-dl] : hB[n-dl-1];
            checks++;
            if (dout !== e || lock_n_out !== hL[n-dl-1]) begin
              failures++;
              $display("FAIL ph=%0d dl=%0d k=%0d dout=%h exp=%h lock=%b exp=%b",
                       ph, dl, k, dout, e, lock_n_out, hL[n-dl-1]);
            end
          end
          n++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
