// tb_srd_controller: three 16-word channel memories (one-cycle read
// latency) are modelled in the testbench. After `start` every write into the
// demosaicking input buffer must carry {R,G,B} of its address, all 16
// addresses must be written once, and dm_start must pulse NPIX + 2 cycles
// after start.
module tb_srd_controller;
  import srd_pkg::*;

  localparam int NPIX = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, ch_re, dm_we, dm_start;
  logic [3:0] ch_addr, dm_addr;
  pix_t       ch_r, ch_g, ch_b;
  rgb_t       dm_data;

  pix_t mr [NPIX], mg [NPIX], mb [NPIX];
  bit   seen [NPIX];

  srd_controller #(.NPIX(NPIX)) dut (.*);

  always_ff @(posedge clk) if (ch_re) begin
    ch_r <= mr[ch_addr]; ch_g <= mg[ch_addr]; ch_b <= mb[ch_addr];
  end

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
      for (int k = 0; k < NPIX; k++) begin
        mr[k] = pix_t'($urandom); mg[k] = pix_t'($urandom); mb[k] = pix_t'($urandom); seen[k] = 0;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!dm_start && cyc < 100) begin
        if (dm_we) begin
          checks++;
          if (dm_data != {mr[dm_addr], mg[dm_addr], mb[dm_addr]} || seen[dm_addr]) begin
            failures++;
            $display("FAIL write addr %0d data %h", dm_addr, dm_data);
          end
          seen[dm_addr] = 1;
        end
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (cyc != NPIX + 2) begin failures++; $display("FAIL dm_start after %0d cycles", cyc); end
      for (int k = 0; k < NPIX; k++) if (!seen[k]) begin failures++; $display("FAIL addr %0d not written", k); break; end
      @(negedge clk);
      checks++;
      if (busy || dm_start) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
