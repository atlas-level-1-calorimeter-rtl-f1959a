// tb_energy_presum: streams random jet elements, coefficients, thresholds
// and enable masks (a new set every tick) and checks Et, Ex, Ey three ticks
// later against an independent model: rounded products (e*c+128)>>8,
// 14-bit two's complement saturation, 12-bit Et saturation, saturated
// elements forcing Et to 4095.
module tb_energy_presum;
  import jem_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst = 1;
  je_t  je [N];
  logic signed [11:0] coef_x [N];
  logic signed [11:0] coef_y [N];
  logic [N-1:0] esum_en;
  je_t thr_xy, thr_et;
  logic [11:0] et;
  logic signed [13:0] ex, ey;
  int checks = 0, failures = 0;
  int n_sat_et = 0, n_sat_xy = 0;

  energy_presum #(.N_EL(N)) dut (.*);
  always #5 clk = ~clk;

  int exp_et [0:999];
  int exp_ex [0:999];
  int exp_ey [0:999];

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int rnd_div(input int a);   // floor((a + 128) / 256)
    int b;
    b = a + 128;
    return (b >= 0) ? b / 256 : -((-b + 255) / 256);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin je[i] = '0; coef_x[i] = '0; coef_y[i] = '0; end
    esum_en = '0; thr_xy = '0; thr_et = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 600; n++) begin
      int sx, sy, se; logic sat;
      sx = 0; sy = 0; se = 0; sat = 0;
      thr_xy = je_t'($urandom % 64);
      thr_et = je_t'($urandom % 128);
      esum_en = (n % 3 == 0) ? '1 : N'($urandom);
      for (int i = 0; i < N; i++) begin
        case ($urandom % 8)
          0: je[i] = JE_SAT;
          1: je[i] = je_t'($urandom % 32);
          default: je[i] = (n % 5 == 0) ? je_t'(700 + $urandom % 300) : je_t'($urandom % 400);
        endcase
        coef_x[i] = (n % 7 == 0) ? 12'sd2047 : 12'($urandom);
        coef_y[i] = (n % 7 == 1) ? -12'sd2048 : 12'($urandom);
        if (esum_en[i] && je[i] >= thr_xy) begin
          sx += rnd_div(int'(je[i]) * int'(coef_x[i]));
          sy += rnd_div(int'(je[i]) * int'(coef_y[i]));
        end
        if (esum_en[i] && je[i] >= thr_et) begin
          se += int'(je[i]);
          if (je[i] == JE_SAT) sat = 1;
        end
      end
      if (sx > 8191 || sx < -8192 || sy > 8191 || sy < -8192) n_sat_xy++;
      exp_ex[n] = (sx > 8191) ? 8191 : (sx < -8192) ? -8192 : sx;
      exp_ey[n] = (sy > 8191) ? 8191 : (sy < -8192) ? -8192 : sy;
      exp_et[n] = (sat || se > 4095) ? 4095 : se;
      if (sat || se > 4095) n_sat_et++;
      @(posedge clk); #1;
      if (n >= 3) begin
        checks++;
        if (int'(et) != exp_et[n-2] || int'(ex) != exp_ex[n-2] || int'(ey) != exp_ey[n-2]) begin
          failures++;
          $display("FAIL n=%0d et=%0d/%0d ex=%0d/%0d ey=%0d/%0d", n, et, exp_et[n-2], ex, exp_ex[n-2], ey, exp_ey[n-2]);
        end
      end
    end
    if (n_sat_et == 0 || n_sat_xy == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
