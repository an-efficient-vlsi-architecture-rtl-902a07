// bicubic_interp: one colour channel of the 2x bi-cubic up-scaler. The
// W x H channel is written into the input buffer; after `start` the control
// unit runs a horizontal pass (input rows -> shared storage, H x 2W) and a
// vertical pass (shared-storage columns -> output memory, 2H x 2W). Each
// output sample is a 4-tap cubic filter: the taps are read one per cycle into
// a tap register, the coefficient generator turns the sample's phase into
// four weights and the processor forms the rounded, saturated sum, which is
// written on the following cycle. Separable two-pass operation with shared
// storage follows the described architecture; memory sizes follow from the
// 2x scale.
//
// Timing: `done` pulses 24*W*H + 8 cycles after `start` (4 cycles per output
// sample of each pass plus the drains). The output memory is read through
// out_re/out_addr with one cycle latency, address y*2W + x.
module bicubic_interp
  import srd_pkg::*;
#(
  parameter int unsigned W  = 256,
  parameter int unsigned H  = 256,
  localparam int unsigned IA = (W * H > 1) ? $clog2(W * H) : 1,
  localparam int unsigned RW = (2 * W * H > 1) ? $clog2(2 * W * H) : 1,
  localparam int unsigned WW = $clog2(4 * W * H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_we,
  input  logic [IA-1:0] in_addr,
  input  pix_t          in_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic          out_re,
  input  logic [WW-1:0] out_addr,
  output pix_t          out_data,
  // events, for monitoring
  output logic          ev_mirror,
  output logic          ev_clamp,
  output logic          ev_pass1
);

  logic                 rd_en, rd_pass, rd_mirrored;
  logic [RW-1:0]        rd_addr;
  logic                 t_valid, t_pass, t_last;
  logic [WW-1:0]        t_waddr;
  logic                 t_half;

  bicubic_cu #(.W(W), .H(H)) u_cu (
    .clk, .rst_n, .start, .busy, .done,
    .rd_en, .rd_pass, .rd_addr, .rd_mirrored,
    .t_valid, .t_pass, .t_last, .t_waddr, .t_half
  );

  pix_t in_q, sh_q;

  sdp_ram #(.DEPTH(W * H), .WIDTH(PIX_W)) u_in_buf (
    .clk, .we(in_we), .waddr(in_addr), .wdata(in_data),
    .re(rd_en && !rd_pass), .raddr(IA'(rd_addr)), .rdata(in_q)
  );

  // tap register and result tag
  pix_t                 taps [4];
  logic                 full, f_pass;
  logic [WW-1:0]        f_waddr;
  logic                 f_half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) taps[k] <= '0;
      full    <= 1'b0;
      f_pass  <= 1'b0;
      f_waddr <= '0;
      f_half  <= 1'b0;
    end else begin
      if (t_valid) begin
        for (int k = 0; k < 3; k++) taps[k] <= taps[k+1];
        taps[3] <= t_pass ? sh_q : in_q;
      end
      full <= t_valid && t_last;
      if (t_valid && t_last) begin
        f_pass  <= t_pass;
        f_waddr <= t_waddr;
        f_half  <= t_half;
      end
    end
  end

  coef_t coef [4];
  pix_t  y;
  logic  clamped;

  bicubic_coeff_gen u_coef (.phase({f_half, {(COEF_FRAC-1){1'b0}}}), .t(coef));
  bicubic_pe        u_pe   (.p(taps), .t(coef), .y(y), .clamped(clamped));

  // shared storage (horizontal results) and output memory
  sdp_ram #(.DEPTH(2 * W * H), .WIDTH(PIX_W)) u_shared (
    .clk, .we(full && !f_pass), .waddr(RW'(f_waddr)), .wdata(y),
    .re(rd_en && rd_pass), .raddr(rd_addr), .rdata(sh_q)
  );

  sdp_ram #(.DEPTH(4 * W * H), .WIDTH(PIX_W)) u_out_buf (
    .clk, .we(full && f_pass), .waddr(f_waddr), .wdata(y),
    .re(out_re), .raddr(out_addr), .rdata(out_data)
  );

  assign ev_mirror = rd_mirrored;
  assign ev_clamp  = full && clamped;
  assign ev_pass1  = full && f_pass;

endmodule
