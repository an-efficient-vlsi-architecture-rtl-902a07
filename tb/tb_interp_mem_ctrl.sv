// tb_interp_mem_ctrl: models a 16-word demosaicking output buffer. After the
// acknowledgement, every write to the interpolator buffers must carry the
// three bytes of its address; bc_start must follow the last write; the three
// interpolator done pulses arrive at different times and `done` must pulse
// only after the last of them.
module tb_interp_mem_ctrl;
  import srd_pkg::*;

  localparam int NPIX = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       dm_done = 0, busy, done, dm_re, bc_we, bc_start;
  logic [3:0] dm_addr, bc_addr;
  rgb_t       dm_data;
  pix_t       bc_r, bc_g, bc_b;
  logic [2:0] bc_done = 0;

  rgb_t mem [NPIX];
  bit   seen [NPIX];

  interp_mem_ctrl #(.NPIX(NPIX)) dut (.*);

  always_ff @(posedge clk) if (dm_re) dm_data <= mem[dm_addr];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int cyc;
      for (int k = 0; k < NPIX; k++) begin mem[k] = rgb_t'($urandom); seen[k] = 0; end
      @(negedge clk); dm_done = 1;
      @(negedge clk); dm_done = 0;
      cyc = 1;
      while (!bc_start && cyc < 100) begin
        if (bc_we) begin
          checks++;
          if ({bc_r, bc_g, bc_b} != mem[bc_addr] || seen[bc_addr]) begin
            failures++;
            $display("FAIL write addr %0d", bc_addr);
          end
          seen[bc_addr] = 1;
        end
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (cyc != NPIX + 2) begin failures++; $display("FAIL bc_start after %0d cycles", cyc); end
      for (int k = 0; k < NPIX; k++) if (!seen[k]) begin failures++; $display("FAIL addr %0d not written", k); break; end
      // done pulses of the three channels in a shuffled order
      for (int s = 0; s < 3; s++) begin
        int ch;
        ch = (s + run) % 3;
        repeat (3 + $urandom % 5) begin
          @(negedge clk);
          checks++;
          if (done) begin failures++; $display("FAIL early done"); end
        end
        bc_done = 3'(1 << ch);
        @(negedge clk); bc_done = 0;
        if (s < 2) begin
          checks++;
          if (done) begin failures++; $display("FAIL early done"); end
        end
      end
      checks++;
      if (!done) begin failures++; $display("FAIL done missing"); end
      @(negedge clk);
      checks++;
      if (busy || done) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
