// tb_boundary_mirror: for N = 256 and N = 8, every coordinate from -3 to
// N+2 is compared with the reflection rule written independently: inside
// stays, -k becomes k, N-1+k becomes N-1-k. Also checks that the mirrored
// coordinate keeps the parity of the virtual one.
module tb_boundary_mirror;

  int checks = 0, failures = 0;

  logic signed [9:0] idx_a;
  logic [7:0]        m_a;
  logic              f_a;
  logic signed [4:0] idx_b;
  logic [2:0]        m_b;
  logic              f_b;

  boundary_mirror #(.N(256)) u_a (.idx(idx_a), .midx(m_a), .mirrored(f_a));
  boundary_mirror #(.N(8))   u_b (.idx(idx_b), .midx(m_b), .mirrored(f_b));

  function automatic int refl(int v, int n);
    if (v < 0) return 0 - v;
    if (v > n - 1) return (n - 1) - (v - (n - 1));
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -3; v <= 258; v++) begin
      idx_a = 10'(v);
      #1;
      checks += 3;
      if (int'(m_a) != refl(v, 256)) begin failures++; $display("FAIL N=256 v=%0d m=%0d", v, m_a); end
      if (f_a != (v < 0 || v > 255)) begin failures++; $display("FAIL flag N=256 v=%0d", v); end
      if (m_a[0] != 1'(v)) begin failures++; $display("FAIL parity v=%0d", v); end
    end
    for (int v = -3; v <= 10; v++) begin
      idx_b = 5'(v);
      #1;
      checks += 2;
      if (int'(m_b) != refl(v, 8)) begin failures++; $display("FAIL N=8 v=%0d m=%0d", v, m_b); end
      if (f_b != (v < 0 || v > 7)) begin failures++; $display("FAIL flag N=8 v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
