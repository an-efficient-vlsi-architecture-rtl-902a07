// tb_sdp_ram: writes random words to a small RAM while keeping a reference
// copy, then reads them back, checking the one-cycle read latency, that
// rdata holds while re is low and that a same-cycle read returns the old word.
module tb_sdp_ram;

  localparam int DEPTH = 64;
  localparam int WIDTH = 24;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             we = 0, re = 0;
  logic [5:0]       waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      we = 1; waddr = 6'(n); wdata = WIDTH'($urandom); model[n] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < DEPTH; n++) begin
      int ad = (n * 37) % DEPTH;
      @(negedge clk); re = 1; raddr = 6'(ad);
      @(negedge clk); re = 0;
      check(model[ad], "read");
      @(negedge clk);
      check(model[ad], "hold");
    end
    // read and write the same address in one cycle
    @(negedge clk); re = 1; we = 1; raddr = 6'd5; waddr = 6'd5; wdata = ~model[5];
    @(negedge clk); re = 0; we = 0;
    check(model[5], "read-during-write old");
    model[5] = ~model[5];
    @(negedge clk); re = 1; raddr = 6'd5;
    @(negedge clk); re = 0;
    check(model[5], "new");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
