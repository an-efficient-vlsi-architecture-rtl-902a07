// carry_skip_adder: WIDTH-bit carry-skip adder (CSkA). The operands are cut
// into groups of BLOCK bits (the last group takes the remainder); each group
// is a ripple-carry block. Per group the propagate bits P_i = A_i xor B_i are
// ANDed; when the whole group propagates, a multiplexer passes the group's
// carry-in straight to its carry-out (the skip), otherwise the ripple carry of
// the block is used. The skip shortens the carry path from one bit per stage
// to one multiplexer per group. This structure follows the described adder;
// the group size of 4 is this design's choice. Combinational, with cin
// available so that a + ~b + 1 gives subtraction.
module carry_skip_adder #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NB = (WIDTH + BLOCK - 1) / BLOCK;

  logic [NB:0] c;   // c[k] is the carry into group k
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_grp
    localparam int unsigned LO = k * BLOCK;
    localparam int unsigned BW = (LO + BLOCK <= WIDTH) ? BLOCK : WIDTH - LO;

    logic          rc;     // ripple carry out of the block
    logic          skip;   // every bit of the group propagates

    rca_block #(.W(BW)) u_rca (
      .a   (a[LO +: BW]),
      .b   (b[LO +: BW]),
      .cin (c[k]),
      .sum (sum[LO +: BW]),
      .cout(rc)
    );

    assign skip     = &(a[LO +: BW] ^ b[LO +: BW]);
    assign c[k + 1] = skip ? c[k] : rc;
  end

  assign cout = c[NB];

endmodule
