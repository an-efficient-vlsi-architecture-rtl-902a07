// tb_bicubic_coeff_gen: sweeps all 256 fractions a and compares the four
// weights with the cubic polynomials evaluated in floating point (within
// 2/256); a = 0 and a = 1/2 must be exact (0,1,0,0 and -1/8,5/8,5/8,-1/8),
// and the weights must sum to one within 3/256.
module tb_bicubic_coeff_gen;
  import srd_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] phase;
  coef_t      t [4];

  bicubic_coeff_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ph = 0; ph < 256; ph++) begin
      real a, e [4];
      int sum;
      phase = 8'(ph);
      #1;
      a = ph / 256.0;
      e[0] = -a * (1.0 - a) * (1.0 - a);
      e[1] = 1.0 - 2.0 * a * a + a * a * a;
      e[2] = a * (1.0 + a - a * a);
      e[3] = a * a * (a - 1.0);
      sum = 0;
      for (int k = 0; k < 4; k++) begin
        real d;
        int  ti;
        ti  = int'(t[k]);
        d   = real'(ti) - e[k] * 256.0;
        sum += ti;
        checks++;
        if (d > 2.0 || d < -2.0) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d t%0d=%0d exp %f", ph, k + 1, t[k], e[k] * 256.0);
        end
      end
      checks++;
      if (sum < 253 || sum > 259) begin failures++; $display("FAIL a=%0d sum %0d", ph, sum); end
      if (ph == 0) begin
        checks++;
        if (t[0] != 0 || t[1] != 256 || t[2] != 0 || t[3] != 0) begin failures++; $display("FAIL a=0"); end
      end
      if (ph == 128) begin
        checks++;
        if (t[0] != -32 || t[1] != 160 || t[2] != 160 || t[3] != -32) begin failures++; $display("FAIL a=1/2"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
