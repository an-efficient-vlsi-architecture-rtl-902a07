// hs_unit: hardware sharing unit of the demosaicking machine. One instance
// serves each interpolated colour (HS1 green, HS2 red, HS3 blue), and every
// case of that colour goes through the same adders, shifter and subtractors:
//
//   y = clamp( ((a + b + c + d) >> sh) + (comp_en ? (2p - n1 - n2) >>> 3 : 0) )
//
// Copying a sample is a = x, others 0, sh = 0; a two-sample average uses
// sh = 1 and a four-sample average sh = 2. The optional term is the linear
// deviation compensation: how far the centre sample p stands above the two
// same-colour samples n1, n2 two pixels away. All additions and subtractions
// are carry-skip adders (subtraction as a + ~b + 1); the shifts are wiring.
// The result is saturated to 0..255 and `clamped` reports it. Shifts
// truncate. The three-operation structure follows the description; the
// compensation equation and its 1/8 gain are this design's choice.
// Combinational.
module hs_unit
  import srd_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  pix_t       a,
  input  pix_t       b,
  input  pix_t       c,
  input  pix_t       d,
  input  logic [1:0] sh,
  input  logic       comp_en,
  input  pix_t       p,
  input  pix_t       n1,
  input  pix_t       n2,
  output pix_t       y,
  output logic       clamped
);

  logic [AW-1:0] s_ab, s_cd, s_all, s_sh;
  logic [AW-1:0] d1, d2, comp, total;
  logic          unused_c0, unused_c1, unused_c2, unused_c3, unused_c4, unused_c5;

  // additions
  carry_skip_adder #(.WIDTH(AW)) u_add_ab (.a(AW'(a)), .b(AW'(b)), .cin(1'b0), .sum(s_ab), .cout(unused_c0));
  carry_skip_adder #(.WIDTH(AW)) u_add_cd (.a(AW'(c)), .b(AW'(d)), .cin(1'b0), .sum(s_cd), .cout(unused_c1));
  carry_skip_adder #(.WIDTH(AW)) u_add_4  (.a(s_ab),   .b(s_cd),   .cin(1'b0), .sum(s_all), .cout(unused_c2));

  // shift
  assign s_sh = s_all >> sh;

  // subtractions: 2p - n1 - n2
  carry_skip_adder #(.WIDTH(AW)) u_sub_1 (.a(AW'(p) << 1), .b(~AW'(n1)), .cin(1'b1), .sum(d1), .cout(unused_c3));
  carry_skip_adder #(.WIDTH(AW)) u_sub_2 (.a(d1),          .b(~AW'(n2)), .cin(1'b1), .sum(d2), .cout(unused_c4));

  assign comp = comp_en ? AW'($signed(d2) >>> 3) : '0;

  carry_skip_adder #(.WIDTH(AW)) u_add_c (.a(s_sh), .b(comp), .cin(1'b0), .sum(total), .cout(unused_c5));

  always_comb begin
    if (total[AW-1]) begin
      y       = '0;
      clamped = 1'b1;
    end else if (total > AW'(255)) begin
      y       = 8'hFF;
      clamped = 1'b1;
    end else begin
      y       = total[7:0];
      clamped = 1'b0;
    end
  end

endmodule
