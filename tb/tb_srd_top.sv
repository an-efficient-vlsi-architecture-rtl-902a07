// tb_srd_top: end-to-end test of the whole machine on small pictures
// (8 x 6 in, 16 x 12 out). Each picture is loaded into the channel
// memories, the machine is started, and the whole result is read back and
// compared with the reference: Bayer reconstruction followed by 2x cubic
// up-scaling of each channel. Pictures: random, pure 0/255 (saturation in
// both stages) and a gradient. Checks the frame time,
// 26*W*H + 4*(W+3)*H + 17 cycles, and counts how often each mechanism
// occurred: mirrored reads in both stages, saturation in both stages, border
// windows, the demosaicking acknowledgement and the vertical pass. A
// mechanism that never occurred is a failure.
module tb_srd_top;
  import srd_pkg::*;
  import srd_ref_pkg::*;

  localparam int W = 8, H = 6;
  localparam int NEV = 7;

  int checks = 0, failures = 0;
  int ev_count [NEV];
  string ev_name [NEV] = '{"demosaic mirror", "demosaic saturation", "border window",
                           "demosaic acknowledge", "interpolator mirror",
                           "interpolator saturation", "vertical pass"};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       load_we = 0, start = 0, busy, done, out_re = 0;
  logic [5:0] load_addr = 0;
  logic [7:0] out_addr = 0;
  rgb_t       load_data = 0, out_data;
  logic       ev_dm_mirror, ev_dm_clamp, ev_dm_border, ev_dm_done;
  logic [2:0] ev_bc_mirror, ev_bc_clamp, ev_bc_pass1;

  srd_top #(.W(W), .H(H)) dut (.*);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[], dm[], ch[3][], up[3][];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pic = 0; pic < 3; pic++) begin
      int cyc, exp_cyc;
      img = new[W * H];
      for (int k = 0; k < W * H; k++)
        case (pic)
          0: img[k] = int'($urandom & 24'hFFFFFF);
          1: img[k] = ($urandom % 2 ? 255 << 16 : 0) | ($urandom % 2 ? 255 << 8 : 0) | ($urandom % 2 ? 255 : 0);
          default: img[k] = ((k % W) * 30 << 16) | ((k / W) * 40 << 8) | (255 - k * 5);
        endcase
      ref_demosaic(W, H, img, dm);
      for (int c = 0; c < 3; c++) begin
        ch[c] = new[W * H];
        for (int k = 0; k < W * H; k++) ch[c][k] = (dm[k] >> (16 - 8 * c)) & 255;
        ref_upscale2(W, H, ch[c], up[c]);
      end
      for (int k = 0; k < W * H; k++) begin
        @(negedge clk); load_we = 1; load_addr = 6'(k); load_data = rgb_t'(img[k]);
      end
      @(negedge clk); load_we = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
      exp_cyc = 26 * W * H + 4 * (W + 3) * H + 17;
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL frame took %0d cycles, expected %0d", cyc, exp_cyc);
      end
      for (int k = 0; k < 4 * W * H; k++) begin
        int exp;
        @(negedge clk); out_re = 1; out_addr = 8'(k);
        @(negedge clk); out_re = 0;
        exp = (up[0][k] << 16) | (up[1][k] << 8) | up[2][k];
        checks++;
        if (int'(out_data) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL pic %0d (%0d,%0d): %h expected %h", pic, k / (2 * W), k % (2 * W), out_data, exp);
        end
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
