// srd_top: super-resolution demosaicking machine with bi-cubic up-scaling.
// A W x H full-colour picture is loaded into three channel memories. After
// `start`:
//   1. the SRD controller merges the channels into {R,G,B} words in the
//      demosaicking input buffer (W*H + 2 cycles);
//   2. the demosaicking machine keeps only the Bayer sample of each pixel and
//      rebuilds all three colours from a 4x4 window with shift/add/subtract
//      hardware sharing units built on carry-skip adders (4*(W+3)*H + 5
//      cycles), then acknowledges;
//   3. the interpolation memory controller splits the result into the input
//      buffers of three per-channel bi-cubic interpolators (W*H + 2 cycles);
//   4. the three interpolators work in parallel, a horizontal then a vertical
//      pass, producing a 2W x 2H picture (24*W*H + 8 cycles).
// A `start` while busy is ignored. `done` pulses at the end; the result is then read through out_re/out_addr
// (address y*2W + x) with one cycle latency as {R,G,B}. At the default
// 256 x 256 input a frame takes about 1.91 million cycles. The ev_* outputs
// pulse on internal events (mirrored reads at the border, saturations, the
// vertical pass) for monitoring. The chain of blocks follows the described
// architecture; handshakes and schedules are this design's choice.
module srd_top
  import srd_pkg::*;
#(
  parameter int unsigned W  = 256,
  parameter int unsigned H  = 256,
  localparam int unsigned IA = (W * H > 1) ? $clog2(W * H) : 1,
  localparam int unsigned OA = $clog2(4 * W * H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // picture load
  input  logic          load_we,
  input  logic [IA-1:0] load_addr,
  input  rgb_t          load_data,
  // control
  input  logic          start,
  output logic          busy,
  output logic          done,
  // result read
  input  logic          out_re,
  input  logic [OA-1:0] out_addr,
  output rgb_t          out_data,
  // monitoring
  output logic          ev_dm_mirror,
  output logic          ev_dm_clamp,
  output logic          ev_dm_border,
  output logic          ev_dm_done,
  output logic [2:0]    ev_bc_mirror,
  output logic [2:0]    ev_bc_clamp,
  output logic [2:0]    ev_bc_pass1
);

  // channel memories
  logic          ch_re;
  logic [IA-1:0] ch_addr;
  pix_t          ch_r, ch_g, ch_b;

  sdp_ram #(.DEPTH(W * H), .WIDTH(PIX_W)) u_red_mem (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data.r),
    .re(ch_re), .raddr(ch_addr), .rdata(ch_r));
  sdp_ram #(.DEPTH(W * H), .WIDTH(PIX_W)) u_green_mem (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data.g),
    .re(ch_re), .raddr(ch_addr), .rdata(ch_g));
  sdp_ram #(.DEPTH(W * H), .WIDTH(PIX_W)) u_blue_mem (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data.b),
    .re(ch_re), .raddr(ch_addr), .rdata(ch_b));

  // SRD controller
  logic          sc_busy, dm_we, dm_start;
  logic [IA-1:0] dm_waddr;
  rgb_t          dm_wdata;

  srd_controller #(.NPIX(W * H)) u_srd_ctrl (
    .clk, .rst_n, .start(start && !busy), .busy(sc_busy),
    .ch_re, .ch_addr, .ch_r, .ch_g, .ch_b,
    .dm_we, .dm_addr(dm_waddr), .dm_data(dm_wdata), .dm_start
  );

  // demosaicking
  logic          dm_busy, dm_done, dm_re;
  logic [IA-1:0] dm_raddr;
  rgb_t          dm_rdata;

  demosaic #(.W(W), .H(H)) u_demosaic (
    .clk, .rst_n,
    .in_we(dm_we), .in_addr(dm_waddr), .in_data(dm_wdata),
    .start(dm_start), .busy(dm_busy), .done(dm_done),
    .out_re(dm_re), .out_addr(dm_raddr), .out_data(dm_rdata),
    .ev_mirror(ev_dm_mirror), .ev_clamp(ev_dm_clamp), .ev_border(ev_dm_border)
  );

  assign ev_dm_done = dm_done;

  // interpolation memory controller
  logic          imc_busy, bc_we, bc_start;
  logic [IA-1:0] bc_addr;
  pix_t          bc_in [3];
  logic [2:0]    bc_done, bc_busy;

  interp_mem_ctrl #(.NPIX(W * H)) u_imc (
    .clk, .rst_n, .dm_done, .busy(imc_busy), .done,
    .dm_re, .dm_addr(dm_raddr), .dm_data(dm_rdata),
    .bc_we, .bc_addr, .bc_r(bc_in[0]), .bc_g(bc_in[1]), .bc_b(bc_in[2]),
    .bc_start, .bc_done
  );

  // three bi-cubic interpolators: 0 red, 1 green, 2 blue
  pix_t bc_out [3];

  for (genvar ch = 0; ch < 3; ch++) begin : g_bc
    bicubic_interp #(.W(W), .H(H)) u_bicubic (
      .clk, .rst_n,
      .in_we(bc_we), .in_addr(bc_addr), .in_data(bc_in[ch]),
      .start(bc_start), .busy(bc_busy[ch]), .done(bc_done[ch]),
      .out_re, .out_addr, .out_data(bc_out[ch]),
      .ev_mirror(ev_bc_mirror[ch]), .ev_clamp(ev_bc_clamp[ch]), .ev_pass1(ev_bc_pass1[ch])
    );
  end

  assign out_data = '{r: bc_out[0], g: bc_out[1], b: bc_out[2]};
  assign busy     = sc_busy || dm_busy || imc_busy || (|bc_busy);

  // Handshake order: each stage starts only after the previous one is idle.
  assert property (@(posedge clk) disable iff (!rst_n) dm_start |-> !dm_busy && !imc_busy);
  assert property (@(posedge clk) disable iff (!rst_n) dm_done  |-> !sc_busy);
  assert property (@(posedge clk) disable iff (!rst_n) bc_start |-> !dm_busy && (bc_busy == 3'b000));

endmodule
