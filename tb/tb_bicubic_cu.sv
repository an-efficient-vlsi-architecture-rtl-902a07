// tb_bicubic_cu: runs the two-pass control unit for a 5 x 3 channel and
// compares every tap read (pass, address), every result tag (write address,
// half-phase) and the `done` time, 24*W*H + 7 cycles after `start`, with
// the expected schedule: rows of the input first (taps x/2-1..x/2+2,
// reflected), then columns of the shared storage.
module tb_bicubic_cu;
  import srd_ref_pkg::*;

  localparam int W = 5, H = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, done, rd_en, rd_pass, rd_mirrored;
  logic [4:0] rd_addr;
  logic       t_valid, t_pass, t_last, t_half;
  logic [5:0] t_waddr;

  bicubic_cu #(.W(W), .H(H)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // expected result tag of the previous cycle's read
  bit pend_last;
  int pend_waddr, pend_half, pend_pass;
  bit pend_valid;

  task automatic step(int pass, int addr, bit mir, bit last, int waddr, int half);
    checks += 3;
    if (!rd_en || rd_pass != 1'(pass)) fail($sformatf("no read / pass %0d", pass));
    if (int'(rd_addr) != addr) fail($sformatf("pass %0d addr %0d exp %0d", pass, rd_addr, addr));
    if (rd_mirrored != mir) fail("mirror flag");
    if (pend_valid) begin
      checks++;
      if (!t_valid || t_last != pend_last || t_pass != 1'(pend_pass) ||
          (pend_last && (int'(t_waddr) != pend_waddr || int'(t_half) != pend_half)))
        fail($sformatf("tag waddr %0d exp %0d", t_waddr, pend_waddr));
    end
    pend_valid = 1; pend_last = last; pend_waddr = waddr; pend_half = half; pend_pass = pass;
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    pend_valid = 0;
    for (int r = 0; r < H; r++)
      for (int x = 0; x < 2 * W; x++)
        for (int k = 0; k < 4; k++) begin
          int v;
          v = x / 2 - 1 + k;
          step(0, r * W + mir(v, W), v < 0 || v >= W, k == 3, r * 2 * W + x, x % 2);
        end
    pend_valid = 0;
    repeat (3) @(negedge clk);
    for (int x = 0; x < 2 * W; x++)
      for (int y = 0; y < 2 * H; y++)
        for (int k = 0; k < 4; k++) begin
          int v;
          v = y / 2 - 1 + k;
          step(1, mir(v, H) * 2 * W + x, v < 0 || v >= H, k == 3, y * 2 * W + x, y % 2);
        end
    cyc = 24 * W * H + 1 + 3;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 24 * W * H + 7) fail($sformatf("done after %0d cycles, expected %0d", cyc, 24 * W * H + 7));
    @(negedge clk);
    checks++;
    if (busy) fail("still busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
