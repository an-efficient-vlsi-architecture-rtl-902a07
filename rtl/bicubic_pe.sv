// bicubic_pe: the bi-cubic interpolation processor, one 4-tap cubic filter
// step. It forms y = sum(t_k * p_k) for the four pixels p and weights t of
// one row or column, accumulates the products with carry-skip adders, adds
// one half for rounding, drops the COEF_FRAC fraction bits and saturates to
// 0..255 (cubic weights can overshoot at edges); `clamped` reports the
// saturation. Applying it first along rows and then along columns gives the
// two-dimensional sum of the 4x4 neighbourhood. Round-half-up and
// saturation are this design's choice. Combinational.
module bicubic_pe
  import srd_pkg::*;
(
  input  pix_t  p [4],
  input  coef_t t [4],
  output pix_t  y,
  output logic  clamped
);

  localparam int unsigned AW = 24;

  logic signed [AW-1:0] prod [4];
  logic [AW-1:0] s01, s23, s_all, s_rnd;
  logic          unused_c0, unused_c1, unused_c2, unused_c3;
  logic signed [AW-1:0] q;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      prod[k] = AW'($signed({1'b0, p[k]}) * t[k]);
    end
  end

  carry_skip_adder #(.WIDTH(AW)) u_add01 (.a(prod[0]), .b(prod[1]), .cin(1'b0), .sum(s01),   .cout(unused_c0));
  carry_skip_adder #(.WIDTH(AW)) u_add23 (.a(prod[2]), .b(prod[3]), .cin(1'b0), .sum(s23),   .cout(unused_c1));
  carry_skip_adder #(.WIDTH(AW)) u_addal (.a(s01),     .b(s23),     .cin(1'b0), .sum(s_all), .cout(unused_c2));
  carry_skip_adder #(.WIDTH(AW)) u_round (.a(s_all),   .b(AW'(1 << (COEF_FRAC - 1))), .cin(1'b0),
                                          .sum(s_rnd), .cout(unused_c3));

  always_comb begin
    q = $signed(s_rnd) >>> COEF_FRAC;
    if (q < 0) begin
      y       = '0;
      clamped = 1'b1;
    end else if (q > 255) begin
      y       = 8'hFF;
      clamped = 1'b1;
    end else begin
      y       = q[7:0];
      clamped = 1'b0;
    end
  end

endmodule
