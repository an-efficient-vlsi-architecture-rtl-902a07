// result_regbank: register bank 2 of the demosaicking machine. It captures
// the three colours produced by the hardware sharing units for one pixel,
// packs them as {R, G, B} and holds them with the pixel address for one
// cycle, driving the write port of the output buffer memory. A result
// presented in cycle t is written to memory at the end of cycle t+1.
module result_regbank
  import srd_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  input  pix_t          in_r,
  input  pix_t          in_g,
  input  pix_t          in_b,
  output logic          we,
  output logic [AW-1:0] waddr,
  output rgb_t          wdata
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we    <= 1'b0;
      waddr <= '0;
      wdata <= '0;
    end else begin
      we <= in_valid;
      if (in_valid) begin
        waddr <= in_addr;
        wdata <= '{r: in_r, g: in_g, b: in_b};
      end
    end
  end

endmodule
