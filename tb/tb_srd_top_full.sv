// tb_srd_top_full: one complete frame at the full size, a 256 x 256 input
// and a 512 x 512 output, with the machine at its default parameters. The
// picture is generated: red = x xor y (sharp edges), green = (x + y) / 2
// (smooth ramp), blue = 255 - y. All 262144 output pixels are compared with
// the reference (Bayer reconstruction, then 2x cubic up-scaling per
// channel), and the frame must take 26*W*H + 4*(W+3)*H + 17 = 1969169
// cycles. Every mechanism counted by the small end-to-end test must occur.
module tb_srd_top_full;
  import srd_pkg::*;
  import srd_ref_pkg::*;

  localparam int W = 256, H = 256;
  localparam int NEV = 7;

  int checks = 0, failures = 0;
  int ev_count [NEV];
  string ev_name [NEV] = '{"demosaic mirror", "demosaic saturation", "border window",
                           "demosaic acknowledge", "interpolator mirror",
                           "interpolator saturation", "vertical pass"};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        load_we = 0, start = 0, busy, done, out_re = 0;
  logic [15:0] load_addr = 0;
  logic [17:0] out_addr = 0;
  rgb_t        load_data = 0, out_data;
  logic        ev_dm_mirror, ev_dm_clamp, ev_dm_border, ev_dm_done;
  logic [2:0]  ev_bc_mirror, ev_bc_clamp, ev_bc_pass1;

  srd_top dut (.*);

  always @(posedge clk) begin
    if (ev_dm_mirror)   ev_count[0]++;
    if (ev_dm_clamp)    ev_count[1]++;
    if (ev_dm_border)   ev_count[2]++;
    if (ev_dm_done)     ev_count[3]++;
    if (|ev_bc_mirror)  ev_count[4]++;
    if (|ev_bc_clamp)   ev_count[5]++;
    if (|ev_bc_pass1)   ev_count[6]++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[], dm[], ch[3][], up[3][];
    int cyc, exp_cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    img = new[W * H];
    for (int k = 0; k < W * H; k++) begin
      int x, y;
      x = k % W; y = k / W;
      img[k] = (((x ^ y) & 255) << 16) | (((x + y) / 2) << 8) | (255 - y);
    end
    ref_demosaic(W, H, img, dm);
    for (int c = 0; c < 3; c++) begin
      ch[c] = new[W * H];
      for (int k = 0; k < W * H; k++) ch[c][k] = (dm[k] >> (16 - 8 * c)) & 255;
      ref_upscale2(W, H, ch[c], up[c]);
    end
    for (int k = 0; k < W * H; k++) begin
      @(negedge clk); load_we = 1; load_addr = 16'(k); load_data = rgb_t'(img[k]);
    end
    @(negedge clk); load_we = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 2500000) begin @(negedge clk); cyc++; end
    exp_cyc = 26 * W * H + 4 * (W + 3) * H + 17;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", cyc, exp_cyc);
    end
    $display("frame: %0d cycles", cyc);
    for (int k = 0; k < 4 * W * H; k++) begin
      int exp;
      @(negedge clk); out_re = 1; out_addr = 18'(k);
      @(negedge clk); out_re = 0;
      exp = (up[0][k] << 16) | (up[1][k] << 8) | up[2][k];
      checks++;
      if (int'(out_data) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d): %h expected %h", k / (2 * W), k % (2 * W), out_data, exp);
      end
    end
    for (int e = 0; e < NEV; e++) begin
      $display("event %-24s %0d", ev_name[e], ev_count[e]);
      checks++;
      if (ev_count[e] == 0) begin failures++; $display("FAIL %s never happened", ev_name[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
