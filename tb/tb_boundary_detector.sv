// tb_boundary_detector: compares the detector with the Bayer layout written
// out as a table (row 0: B G B G ..., row 1: G R G R ...) over a 16 x 16
// patch at both ends of a 256 x 256 image, and checks the border flag
// (window rows/columns -1..+2 leave the image).
module tb_boundary_detector;
  import srd_pkg::*;

  int checks = 0, failures = 0;
  logic [9:0] i, j;
  cfa_e color;
  logic at_border;

  boundary_detector #(.CW(10), .W(256), .H(256)) dut (.*);

  // rows as strings, the 2x2 tile repeated
  string pattern [2] = '{"BGBGBGBG", "GRGRGRGR"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int base = 0; base < 2; base++)
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          int ii, jj;
          byte ch;
          cfa_e exp;
          logic exp_b;
          ii = base ? 240 + y : y;
          jj = base ? 240 + x : x;
          i = 10'(ii); j = 10'(jj);
          #1;
          ch = pattern[ii % 2][jj % 8];
          if (ch == "B")      exp = CFA_B;
          else if (ch == "R") exp = CFA_R;
          else if (ii % 2 == 0) exp = CFA_GB;
          else                exp = CFA_GR;
          exp_b = (ii - 1 < 0) || (jj - 1 < 0) || (ii + 2 > 255) || (jj + 2 > 255);
          checks += 2;
          if (color != exp) begin
            failures++;
            $display("FAIL colour at (%0d,%0d): %s", ii, jj, color.name());
          end
          if (at_border != exp_b) begin
            failures++;
            $display("FAIL border at (%0d,%0d)", ii, jj);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
