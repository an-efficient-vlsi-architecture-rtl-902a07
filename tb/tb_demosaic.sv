// tb_demosaic: loads an 8 x 6 full-colour image into the demosaicking
// machine, runs it and reads the whole output buffer back, comparing every
// pixel with the reference reconstruction (Bayer sampling, mirrored
// neighbourhood, bilinear R/B, compensated G). Three images: random, one
// made only of 0 and 255 (forces saturation), and a smooth gradient. Checks
// the frame time 4*(W+3)*H + 5 cycles and that mirrored reads, saturation
// and border pixels all occurred.
module tb_demosaic;
  import srd_pkg::*;
  import srd_ref_pkg::*;

  localparam int W = 8, H = 6;

  int checks = 0, failures = 0;
  int n_mirror = 0, n_clamp = 0, n_border = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_we = 0, start = 0, busy, done, out_re = 0;
  logic [5:0] in_addr = 0, out_addr = 0;
  rgb_t       in_data = 0, out_data;
  logic       ev_mirror, ev_clamp, ev_border;

  demosaic #(.W(W), .H(H)) dut (.*);

  always @(posedge clk) begin
    if (ev_mirror) n_mirror++;
    if (ev_clamp)  n_clamp++;
    if (ev_border) n_border++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[], res[];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pic = 0; pic < 3; pic++) begin
      int cyc;
      img = new[W * H];
      for (int k = 0; k < W * H; k++) begin
        case (pic)
          0: img[k] = int'($urandom & 24'hFFFFFF);
          1: img[k] = ($urandom % 2 ? 255 << 16 : 0) | ($urandom % 2 ? 255 << 8 : 0) | ($urandom % 2 ? 255 : 0);
          default: img[k] = ((k % W) * 30 << 16) | ((k / W) * 40 << 8) | (k * 5);
        endcase
      end
      ref_demosaic(W, H, img, res);
      for (int k = 0; k < W * H; k++) begin
        @(negedge clk); in_we = 1; in_addr = 6'(k); in_data = rgb_t'(img[k]);
      end
      @(negedge clk); in_we = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 4 * (W + 3) * H + 5) begin
        failures++;
        $display("FAIL frame took %0d cycles, expected %0d", cyc, 4 * (W + 3) * H + 5);
      end
      for (int k = 0; k < W * H; k++) begin
        @(negedge clk); out_re = 1; out_addr = 6'(k);
        @(negedge clk); out_re = 0;
        checks++;
        if (int'(out_data) != res[k]) begin
          failures++;
          if (failures < 10) $display("FAIL pic %0d pixel (%0d,%0d): %h expected %h", pic, k / W, k % W, out_data, res[k]);
        end
      end
    end
    checks += 3;
    if (n_mirror == 0) begin failures++; $display("FAIL no mirrored read"); end
    if (n_clamp == 0)  begin failures++; $display("FAIL no saturation"); end
    if (n_border == 0) begin failures++; $display("FAIL no border pixel"); end
    $display("events: mirror=%0d clamp=%0d border=%0d", n_mirror, n_clamp, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
