// tb_bicubic_interp: loads a 6 x 5 channel, runs the two passes and reads
// the 12 x 10 result, comparing every sample with the reference separable
// 2x cubic scaler. Three pictures: random, a 0/255 checkerboard of 2x2
// tiles (forces overshoot and saturation) and a ramp. Checks the run time,
// 24*W*H + 7 cycles, and that mirrored taps, saturation and the vertical
// pass occurred.
module tb_bicubic_interp;
  import srd_pkg::*;
  import srd_ref_pkg::*;

  localparam int W = 6, H = 5;

  int checks = 0, failures = 0, n_mirror = 0, n_clamp = 0, n_pass1 = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_we = 0, start = 0, busy, done, out_re = 0;
  logic [4:0] in_addr = 0;
  logic [6:0] out_addr = 0;
  pix_t       in_data = 0, out_data;
  logic       ev_mirror, ev_clamp, ev_pass1;

  bicubic_interp #(.W(W), .H(H)) dut (.*);

  always @(posedge clk) begin
    if (ev_mirror) n_mirror++;
    if (ev_clamp)  n_clamp++;
    if (ev_pass1)  n_pass1++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ch[], res[];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pic = 0; pic < 3; pic++) begin
      int cyc;
      ch = new[W * H];
      for (int k = 0; k < W * H; k++)
        case (pic)
          0: ch[k] = int'($urandom % 256);
          1: ch[k] = (((k / W) / 2 + (k % W) / 2) % 2) ? 255 : 0;
          default: ch[k] = (k * 8) % 256;
        endcase
      ref_upscale2(W, H, ch, res);
      for (int k = 0; k < W * H; k++) begin
        @(negedge clk); in_we = 1; in_addr = 5'(k); in_data = pix_t'(ch[k]);
      end
      @(negedge clk); in_we = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 20000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 24 * W * H + 7) begin
        failures++;
        $display("FAIL run took %0d cycles, expected %0d", cyc, 24 * W * H + 7);
      end
      for (int k = 0; k < 4 * W * H; k++) begin
        @(negedge clk); out_re = 1; out_addr = 7'(k);
        @(negedge clk); out_re = 0;
        checks++;
        if (int'(out_data) != res[k]) begin
          failures++;
          if (failures < 10) $display("FAIL pic %0d (%0d,%0d): %0d expected %0d", pic, k / (2 * W), k % (2 * W), out_data, res[k]);
        end
      end
    end
    checks += 3;
    if (n_mirror == 0) begin failures++; $display("FAIL no mirrored tap"); end
    if (n_clamp == 0)  begin failures++; $display("FAIL no saturation"); end
    if (n_pass1 == 0)  begin failures++; $display("FAIL no vertical pass"); end
    $display("events: mirror=%0d clamp=%0d vertical=%0d", n_mirror, n_clamp, n_pass1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
