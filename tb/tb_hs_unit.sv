// tb_hs_unit: random operands for every mode (copy, 2- and 4-sample
// average, with and without compensation), plus extreme values that must
// saturate at 0 and at 255. Each result is compared with
// clamp(((a+b+c+d) >> sh) + floor((2p - n1 - n2) / 8)) computed in integers.
module tb_hs_unit;
  import srd_pkg::*;

  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;
  pix_t a, b, c, d, p, n1, n2, y;
  logic [1:0] sh;
  logic comp_en, clamped;

  hs_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 30000; n++) begin
      int sum, ex, cp;
      bit   ext;
      ext = (n % 5 == 0);
      a = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      b = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      c = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      d = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      p = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      n1 = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      n2 = ext ? {8{1'($urandom)}} : pix_t'($urandom);
      sh = 2'($urandom % 3);
      comp_en = 1'($urandom);
      if (sh == 0) begin b = 0; c = 0; d = 0; end
      if (sh == 1) begin c = 0; d = 0; end
      #1;
      sum = (int'(a) + int'(b) + int'(c) + int'(d)) >> sh;
      cp  = comp_en ? ((2 * int'(p) - int'(n1) - int'(n2)) >>> 3) : 0;
      ex  = sum + cp;
      if (ex < 0) n_lo++;
      if (ex > 255) n_hi++;
      checks += 2;
      if (int'(y) != ((ex < 0) ? 0 : (ex > 255) ? 255 : ex)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d d=%0d sh=%0d comp=%0d p=%0d n1=%0d n2=%0d y=%0d exp=%0d",
                                    a, b, c, d, sh, comp_en, p, n1, n2, y, ex);
      end
      if (clamped != (ex < 0 || ex > 255)) failures++;
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin
      failures++;
      $display("FAIL saturation not exercised lo=%0d hi=%0d", n_lo, n_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
