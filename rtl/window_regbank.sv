// window_regbank: register bank 1 of the demosaicking machine, sixteen
// 8-bit shift registers holding a 4x4 window of Bayer samples, win[row][col].
// Samples arrive one per cycle, a column at a time, top row first
// (smp_slot 0..3). Slots 0..2 wait in a column buffer; slot 3 completes the
// column, and the whole window shifts one column to the left while the new
// column enters at col 3. The window is updated at the clock edge that
// accepts slot 3. Column-wise sliding is this design's choice.
module window_regbank
  import srd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 smp_valid,
  input  logic [1:0]           smp_slot,
  input  pix_t                 smp,
  output logic [3:0][3:0][7:0] win
);

  pix_t colbuf [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
      for (int r = 0; r < 3; r++) colbuf[r] <= '0;
    end else if (smp_valid) begin
      if (smp_slot != 2'd3) begin
        colbuf[smp_slot] <= smp;
      end else begin
        for (int r = 0; r < 4; r++) begin
          for (int c = 0; c < 3; c++) win[r][c] <= win[r][c+1];
          win[r][3] <= (r < 3) ? colbuf[r] : smp;
        end
      end
    end
  end

endmodule
