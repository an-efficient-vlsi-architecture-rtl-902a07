// srd_controller: front end of the super-resolution demosaicking (SRD)
// machine. The picture arrives as three separate channel memories (red,
// green, blue). After `start` the controller reads the three memories at the
// same address, one address per cycle, packs the three bytes into one
// {R, G, B} word and writes it to the demosaicking input buffer at that
// address. One cycle after the last word is written it pulses `dm_start`.
// A frame of NPIX pixels takes NPIX + 2 cycles. The packing order R, G, B
// follows the description; the schedule is this design's choice.
module srd_controller
  import srd_pkg::*;
#(
  parameter int unsigned NPIX = 65536,
  localparam int unsigned AW  = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  // channel memory reads (one cycle latency)
  output logic          ch_re,
  output logic [AW-1:0] ch_addr,
  input  pix_t          ch_r,
  input  pix_t          ch_g,
  input  pix_t          ch_b,
  // demosaicking input buffer write
  output logic          dm_we,
  output logic [AW-1:0] dm_addr,
  output rgb_t          dm_data,
  output logic          dm_start
);

  logic          run;
  logic [AW-1:0] a;
  logic          last_d;

  assign ch_re   = run;
  assign ch_addr = a;
  assign dm_data = '{r: ch_r, g: ch_g, b: ch_b};
  assign busy    = run || dm_we || dm_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      a        <= '0;
      dm_we    <= 1'b0;
      dm_addr  <= '0;
      last_d   <= 1'b0;
      dm_start <= 1'b0;
    end else begin
      dm_we    <= run;
      dm_addr  <= a;
      last_d   <= run && (32'(a) == NPIX - 1);
      dm_start <= last_d;
      if (start && !run) begin
        run <= 1'b1;
        a   <= '0;
      end else if (run) begin
        if (32'(a) == NPIX - 1) run <= 1'b0;
        else                    a   <= a + 1'b1;
      end
    end
  end

endmodule
