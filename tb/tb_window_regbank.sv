// tb_window_regbank: shifts random columns into register bank 1, sometimes
// with idle cycles between samples, and after every completed column
// compares the 4x4 window with the last four columns kept by the testbench.
module tb_window_regbank;
  import srd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 smp_valid = 0;
  logic [1:0]           smp_slot = 0;
  pix_t                 smp = 0;
  logic [3:0][3:0][7:0] win;

  window_regbank dut (.*);

  pix_t cols [$];   // each entry: one column, 4 samples top first, flattened

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) cols.push_back(8'd0);
    for (int n = 0; n < 4; n++) cols.push_back(8'd0);
    for (int n = 0; n < 4; n++) cols.push_back(8'd0);
    for (int n = 0; n < 4; n++) cols.push_back(8'd0);
    for (int col = 0; col < 40; col++) begin
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        smp_valid = 1; smp_slot = 2'(r); smp = pix_t'($urandom);
        cols.push_back(smp);
        if ($urandom % 3 == 0) begin
          @(negedge clk);
          smp_valid = 0; smp = pix_t'($urandom); smp_slot = 2'($urandom);
        end
      end
      @(negedge clk);
      smp_valid = 0;
      repeat (4) void'(cols.pop_front());
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (win[r][c] != cols[c * 4 + r]) begin
            failures++;
            if (failures < 10) $display("FAIL col %0d win[%0d][%0d]=%0d exp %0d", col, r, c, win[r][c], cols[c*4+r]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
