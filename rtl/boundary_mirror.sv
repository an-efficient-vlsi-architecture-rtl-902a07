// boundary_mirror: boundary mirror machine for one coordinate. A window
// around a pixel near the edge asks for rows or columns that do not exist
// (negative, or N and beyond). They are reflected about the first or last
// sample: -1 -> 1, -2 -> 2, N -> N-2, N+1 -> N-3. Whole-sample reflection
// keeps the parity of the coordinate, so a mirrored position carries the same
// Bayer colour as the one it stands in for. Valid for offsets up to N-1
// outside the image. Combinational; `mirrored` flags an outside input.
module boundary_mirror #(
  parameter int unsigned N  = 256,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW = AW + 2
) (
  input  logic signed [IW-1:0] idx,
  output logic        [AW-1:0] midx,
  output logic                 mirrored
);

  localparam logic signed [IW-1:0] LAST = IW'(N - 1);

  logic signed [IW-1:0] m;

  always_comb begin
    mirrored = 1'b1;
    if (idx < 0)         m = -idx;
    else if (idx > LAST) m = 2 * LAST - idx;
    else begin
      m        = idx;
      mirrored = 1'b0;
    end
    midx = m[AW-1:0];
  end

endmodule
