// rca_block: W-bit ripple-carry adder, a chain of full adders. It is the
// building block of the carry-skip adder, whose groups are each one such
// block. Purely combinational: sum and cout settle after W full-adder delays.
module rca_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < int'(W); i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    cout = c;
  end

endmodule
