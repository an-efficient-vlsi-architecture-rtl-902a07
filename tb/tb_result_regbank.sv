// tb_result_regbank: random results with random valid; the write port must
// show each valid result, packed {R,G,B}, exactly one cycle later, and must
// not write in a cycle after an invalid one.
module tb_result_regbank;
  import srd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, we;
  logic [15:0] in_addr = 0, waddr;
  pix_t        in_r = 0, in_g = 0, in_b = 0;
  rgb_t        wdata;

  result_regbank #(.AW(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        pv;
    logic [15:0] pa;
    logic [23:0] pd;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pv = 0; pa = 0; pd = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++;
      if (we != pv || (pv && (waddr != pa || wdata != pd))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d we=%0d addr=%h data=%h exp %0d %h %h", n, we, waddr, wdata, pv, pa, pd);
      end
      in_valid = 1'($urandom);
      in_addr = 16'($urandom);
      in_r = pix_t'($urandom); in_g = pix_t'($urandom); in_b = pix_t'($urandom);
      pv = in_valid; pa = in_addr; pd = {in_r, in_g, in_b};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
