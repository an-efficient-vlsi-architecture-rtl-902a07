// tb_demosaic_cu: runs the control unit on a 6 x 5 image twice. Every read
// address is compared with the expected scan (centre row i, virtual column
// -1..W+1, rows i-1..i+2, reflected at the border); every sample tag and
// every announced centre is checked, and `done` must come exactly
// 4*(W+3)*H + 5 cycles after `start`.
module tb_demosaic_cu;
  import srd_ref_pkg::*;

  localparam int W = 6, H = 5;

  int checks = 0, failures = 0, mirrors = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, done, rd_en, rd_mirrored, smp_valid, ctr_valid;
  logic [4:0] rd_addr;
  logic [1:0] smp_slot;
  logic [2:0] smp_row, ctr_i;
  logic [2:0] smp_col, ctr_j;

  demosaic_cu #(.W(W), .H(H)) dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int cyc, n_ctr, exp_ctr;
      int prev_row, prev_col, prev_slot;
      bit prev_valid;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; n_ctr = 0; prev_valid = 0; exp_ctr = 0;
      for (int i = 0; i < H; i++)
        for (int c = -1; c <= W + 1; c++)
          for (int r = 0; r < 4; r++) begin
            int er, ec;
            er = mir(i - 1 + r, H); ec = mir(c, W);
            checks += 3;
            if (!rd_en) fail($sformatf("no read at i=%0d c=%0d r=%0d", i, c, r));
            if (int'(rd_addr) != er * W + ec) fail($sformatf("addr %0d exp %0d", rd_addr, er * W + ec));
            if (rd_mirrored != (i - 1 + r < 0 || i - 1 + r >= H || c < 0 || c >= W)) fail("mirror flag");
            if (rd_mirrored) mirrors++;
            if (prev_valid) begin
              checks++;
              if (!smp_valid || int'(smp_row) != prev_row || int'(smp_col) != prev_col || int'(smp_slot) != prev_slot)
                fail("sample tag");
            end
            if (ctr_valid) begin
              checks++;
              if (int'(ctr_i) * W + int'(ctr_j) != exp_ctr) fail($sformatf("centre %0d,%0d", ctr_i, ctr_j));
              exp_ctr++;
            end
            prev_valid = 1; prev_row = er; prev_col = ec; prev_slot = r;
            @(negedge clk); cyc++;
          end
      // drain
      while (!done && cyc < 1000) begin
        if (ctr_valid) begin
          checks++;
          if (int'(ctr_i) * W + int'(ctr_j) != exp_ctr) fail("last centre");
          exp_ctr++;
        end
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (exp_ctr != W * H) fail($sformatf("%0d centres, expected %0d", exp_ctr, W * H));
      if (cyc != 4 * (W + 3) * H + 5) fail($sformatf("done after %0d cycles, expected %0d", cyc, 4 * (W + 3) * H + 5));
      @(negedge clk);
      checks++;
      if (busy || done) fail("not idle after done");
    end
    checks++;
    if (mirrors == 0) fail("no mirrored read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
