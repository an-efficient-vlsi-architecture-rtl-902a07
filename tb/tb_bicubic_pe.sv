// tb_bicubic_pe: random pixels and weights (including the two weight sets
// the 2x scaler uses, and arbitrary ones in -128..383) against
// clamp((sum(p_k * t_k) + 128) >> 8) in integers; saturation at both ends
// must occur.
module tb_bicubic_pe;
  import srd_pkg::*;

  int checks = 0, failures = 0, n_clamp = 0;
  pix_t  p [4];
  coef_t t [4];
  pix_t  y;
  logic  clamped;

  bicubic_pe dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int acc, ex;
      for (int k = 0; k < 4; k++) p[k] = (n % 4 == 3) ? {8{1'($urandom)}} : pix_t'($urandom);
      case (n % 3)
        0: begin t[0] = -32; t[1] = 160; t[2] = 160; t[3] = -32; end
        1: begin t[0] = 0;   t[1] = 256; t[2] = 0;   t[3] = 0;   end
        default: for (int k = 0; k < 4; k++) t[k] = coef_t'(int'($urandom % 512) - 128);
      endcase
      #1;
      acc = 0;
      for (int k = 0; k < 4; k++) acc += int'(p[k]) * int'(t[k]);
      ex = (acc + 128) >>> 8;
      checks += 2;
      if (ex < 0 || ex > 255) n_clamp++;
      if (int'(y) != ((ex < 0) ? 0 : (ex > 255) ? 255 : ex)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d,%0d,%0d,%0d t=%0d,%0d,%0d,%0d y=%0d exp %0d",
                                    p[0], p[1], p[2], p[3], t[0], t[1], t[2], t[3], y, ex);
      end
      if (clamped != (ex < 0 || ex > 255)) failures++;
    end
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
