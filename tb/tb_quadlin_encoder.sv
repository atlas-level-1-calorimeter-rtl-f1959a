// tb_quadlin_encoder: all 4096 inputs of the unsigned code (table of scale
// factors 1/4/16/64) and of the signed variant, checked by decoding the
// result and comparing it with the input rounded down to the scale step.
module tb_quadlin_encoder;
  logic [11:0] din;
  logic [7:0]  du, ds;
  int checks = 0, failures = 0;

  quadlin_encoder #(.SIGNED(1'b0)) u_u (.din, .dout(du));
  quadlin_encoder #(.SIGNED(1'b1)) u_s (.din, .dout(ds));

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int sh, scale, vs, m;
      din = 12'(v);
      #1;
      // unsigned
      scale = (v < 64) ? 0 : (v < 256) ? 1 : (v < 1024) ? 2 : 3;
      sh = 2 * scale;
      checks++;
      if (du !== {2'(scale), 6'(v >> sh)}) begin
        failures++; $display("FAIL u v=%0d got %h", v, du);
      end
      // signed
      vs = (v >= 2048) ? v - 4096 : v;
      m  = (vs < 0) ? -vs - 1 : vs;
      scale = (m < 32) ? 0 : (m < 128) ? 1 : (m < 512) ? 2 : 3;
      sh = 2 * scale;
      checks++;
      // decoded value: sign-extended mantissa times 4^scale
      begin
        int dec, mant;
        mant = int'(ds[5:0]);
        if (mant >= 32) mant -= 64;
        dec = mant * (1 << sh);
        if (ds[7:6] != 2'(scale) || dec > vs || dec + (1 << sh) <= vs) begin
          failures++; $display("FAIL s v=%0d got %h dec=%0d", vs, ds, dec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
