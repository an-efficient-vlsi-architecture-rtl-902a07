// boundary_detector: locates a pixel position (i, j) on the Bayer colour
// filter array. Rows 0, 2, 4, ... read B G B G ..., rows 1, 3, 5, ... read
// G R G R ..., so the class follows from the parities of i and j: blue at
// even/even, red at odd/odd, green on a blue row at even/odd and green on a
// red row at odd/even. The detector also reports whether (i, j) lies on the
// outer ring of the image, where a window reaches past the border and the
// boundary mirror machine must supply samples. Combinational.
module boundary_detector
  import srd_pkg::*;
#(
  parameter int unsigned CW = 10,
  parameter int unsigned W  = 256,
  parameter int unsigned H  = 256
) (
  input  logic [CW-1:0] i,
  input  logic [CW-1:0] j,
  output cfa_e          color,
  output logic          at_border
);

  always_comb begin
    color     = cfa_e'({i[0], j[0]});
    at_border = (i == '0) || (j == '0) ||
                (32'(i) >= H - 2) || (32'(j) >= W - 2);
  end

endmodule
