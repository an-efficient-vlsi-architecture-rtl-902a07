// sdp_ram: simple dual-port synchronous RAM, the storage element of every
// image buffer in the design (channel memories, demosaicking input and output
// buffers, bi-cubic input buffer, shared row storage and output buffer). One
// write port and one read port, both on clk. A read issued with re in cycle t
// returns its word on rdata in cycle t+1; rdata holds its value when re is
// low. Writing and reading one address in the same cycle returns the old
// word. Contents are not reset: the design writes each location before it
// reads it. The read latency of one cycle, matching FPGA block RAM, is this
// design's choice.
module sdp_ram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
