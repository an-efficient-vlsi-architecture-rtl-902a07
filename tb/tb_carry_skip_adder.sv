// tb_carry_skip_adder: checks the carry-skip adder against the integer sum.
// An 8-bit instance with 4-bit groups is tried exhaustively over a, b and
// carry-in; a 12-bit and a 13-bit instance (whose last group is short) get
// random operands plus the all-propagate patterns that exercise the skip
// path. Sum and carry-out are compared with a + b + cin.
module tb_carry_skip_adder;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [11:0] a12, b12, s12;
  logic        c12, co12;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;

  carry_skip_adder #(.WIDTH(8),  .BLOCK(4)) u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  carry_skip_adder #(.WIDTH(12), .BLOCK(4)) u12 (.a(a12), .b(b12), .cin(c12), .sum(s12), .cout(co12));
  carry_skip_adder #(.WIDTH(13), .BLOCK(4)) u13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); c8 = 1'(ci);
          #1;
          checks++;
          if ({co8, s8} != 9'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d = %0d", x, y, ci, {co8, s8});
          end
        end
    for (int n = 0; n < 20000; n++) begin
      logic [11:0] ra, rb;
      logic [12:0] qa, qb;
      ra = 12'($urandom); rb = 12'($urandom);
      qa = 13'($urandom); qb = 13'($urandom);
      if (n % 4 == 1) rb = ~ra;              // every group propagates
      if (n % 4 == 2) qb = ~qa ^ 13'(1 << ($urandom % 13));
      a12 = ra; b12 = rb; c12 = 1'($urandom);
      a13 = qa; b13 = qb; c13 = 1'($urandom);
      #1;
      checks += 2;
      if ({co12, s12} != 13'(32'(ra) + 32'(rb) + 32'(c12))) begin
        failures++;
        if (failures < 10) $display("FAIL 12-bit %h+%h+%0d = %h", ra, rb, c12, {co12, s12});
      end
      if ({co13, s13} != 14'(32'(qa) + 32'(qb) + 32'(c13))) begin
        failures++;
        if (failures < 10) $display("FAIL 13-bit %h+%h+%0d = %h", qa, qb, c13, {co13, s13});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
