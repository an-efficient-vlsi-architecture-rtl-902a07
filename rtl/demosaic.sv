// demosaic: the colour demosaicking machine. The full-colour input image is
// written into the input buffer (W*H words of {R,G,B}); the machine then
// rebuilds every pixel from the Bayer samples alone, which the boundary
// detector picks out of each word by position (B G / G R pattern), and
// writes the result to the output buffer.
//
// Data path per pixel (i, j), window win[r][c] = sample (i-1+r, j-1+c):
//   control unit -> input buffer -> boundary detector (channel pick)
//   -> register bank 1 (4x4 window) -> HS1 (G), HS2 (R), HS3 (B)
//   -> register bank 2 -> output buffer
// with the boundary mirror machine inside the control unit reflecting reads
// that fall outside the image.
//
// Interpolation, C = win[1][1] (centre), N/S/W/E its four direct
// neighbours, D the four diagonal ones:
//   at B or R:  G = avg(N,S,W,E) + (2C - win[3][1] - win[1][3]) / 8
//               other colour = avg(D), own colour = C
//   at G on a blue row: R = avg(N,S), B = avg(W,E), G = C
//   at G on a red row:  R = avg(W,E), B = avg(N,S), G = C
// Only shifts, additions and subtractions are used. The block structure
// follows the described machine; the equations and the window schedule are
// this design's choice.
//
// Timing: after a one-cycle `start`, 4*(W+3) cycles per image row; `done`
// pulses once the last pixel is in the output buffer. The output buffer
// can be read (one-cycle latency) while the machine is idle.
module demosaic
  import srd_pkg::*;
#(
  parameter int unsigned W  = 256,
  parameter int unsigned H  = 256,
  localparam int unsigned XW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned YW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned AW = (W * H > 1) ? $clog2(W * H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // input buffer write port
  input  logic          in_we,
  input  logic [AW-1:0] in_addr,
  input  rgb_t          in_data,
  // control
  input  logic          start,
  output logic          busy,
  output logic          done,
  // output buffer read port
  input  logic          out_re,
  input  logic [AW-1:0] out_addr,
  output rgb_t          out_data,
  // events, for monitoring: a mirrored read, a saturated result, a pixel
  // whose window crosses the image border
  output logic          ev_mirror,
  output logic          ev_clamp,
  output logic          ev_border
);

  // control unit and input buffer
  logic          rd_en, rd_mirrored;
  logic [AW-1:0] rd_addr;
  logic          smp_valid, ctr_valid;
  logic [1:0]    smp_slot;
  logic [YW-1:0] smp_row, ctr_i;
  logic [XW-1:0] smp_col, ctr_j;
  rgb_t          rd_data;

  demosaic_cu #(.W(W), .H(H)) u_cu (
    .clk, .rst_n, .start, .busy, .done,
    .rd_en, .rd_addr, .rd_mirrored,
    .smp_valid, .smp_slot, .smp_row, .smp_col,
    .ctr_valid, .ctr_i, .ctr_j
  );

  sdp_ram #(.DEPTH(W * H), .WIDTH($bits(rgb_t))) u_in_buf (
    .clk, .we(in_we), .waddr(in_addr), .wdata(in_data),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  // boundary detector for the sample: which colour the sensor saw there
  localparam int unsigned CW = ((XW > YW) ? XW : YW) + 1;
  cfa_e smp_color, ctr_color;
  logic ctr_border;

  boundary_detector #(.CW(CW), .W(W), .H(H)) u_bd_smp (
    .i(CW'(smp_row)), .j(CW'(smp_col)), .color(smp_color), .at_border()
  );

  // register bank 1: the 4x4 window
  logic [3:0][3:0][7:0] win;

  window_regbank u_rb1 (
    .clk, .rst_n,
    .smp_valid, .smp_slot,
    .smp(cfa_sample(rd_data, smp_color)),
    .win
  );

  // centre tag, registered with the window update
  logic          win_valid;
  logic [YW-1:0] win_i;
  logic [XW-1:0] win_j;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_i     <= '0;
      win_j     <= '0;
    end else begin
      win_valid <= ctr_valid;
      win_i     <= ctr_i;
      win_j     <= ctr_j;
    end
  end

  boundary_detector #(.CW(CW), .W(W), .H(H)) u_bd_ctr (
    .i(CW'(win_i)), .j(CW'(win_j)), .color(ctr_color), .at_border(ctr_border)
  );

  // operand selection for the three hardware sharing units
  typedef struct packed {
    pix_t       a, b, c, d;
    logic [1:0] sh;
    logic       comp_en;
  } hs_op_t;

  hs_op_t op_g, op_r, op_b;

  function automatic hs_op_t op_copy(pix_t x);
    return '{a: x, b: '0, c: '0, d: '0, sh: 2'd0, comp_en: 1'b0};
  endfunction
  function automatic hs_op_t op_avg2(pix_t x, pix_t y);
    return '{a: x, b: y, c: '0, d: '0, sh: 2'd1, comp_en: 1'b0};
  endfunction
  function automatic hs_op_t op_avg4(pix_t x, pix_t y, pix_t z, pix_t w, logic comp);
    return '{a: x, b: y, c: z, d: w, sh: 2'd2, comp_en: comp};
  endfunction

  pix_t ctr, nn, ss, ww, ee, d00, d02, d20, d22, s2, e2;

  always_comb begin
    ctr = win[1][1];
    nn  = win[0][1];
    ss  = win[2][1];
    ww  = win[1][0];
    ee  = win[1][2];
    d00 = win[0][0];
    d02 = win[0][2];
    d20 = win[2][0];
    d22 = win[2][2];
    s2  = win[3][1];
    e2  = win[1][3];

    unique case (ctr_color)
      CFA_B: begin
        op_g = op_avg4(nn, ss, ww, ee, 1'b1);
        op_r = op_avg4(d00, d02, d20, d22, 1'b0);
        op_b = op_copy(ctr);
      end
      CFA_R: begin
        op_g = op_avg4(nn, ss, ww, ee, 1'b1);
        op_r = op_copy(ctr);
        op_b = op_avg4(d00, d02, d20, d22, 1'b0);
      end
      CFA_GB: begin
        op_g = op_copy(ctr);
        op_r = op_avg2(nn, ss);
        op_b = op_avg2(ww, ee);
      end
      default: begin  // CFA_GR
        op_g = op_copy(ctr);
        op_r = op_avg2(ww, ee);
        op_b = op_avg2(nn, ss);
      end
    endcase
  end

  pix_t g_out, r_out, b_out;
  logic g_clamp, r_clamp, b_clamp;

  hs_unit u_hs1 (.a(op_g.a), .b(op_g.b), .c(op_g.c), .d(op_g.d), .sh(op_g.sh),
                 .comp_en(op_g.comp_en), .p(ctr), .n1(s2), .n2(e2), .y(g_out), .clamped(g_clamp));
  hs_unit u_hs2 (.a(op_r.a), .b(op_r.b), .c(op_r.c), .d(op_r.d), .sh(op_r.sh),
                 .comp_en(op_r.comp_en), .p(ctr), .n1(s2), .n2(e2), .y(r_out), .clamped(r_clamp));
  hs_unit u_hs3 (.a(op_b.a), .b(op_b.b), .c(op_b.c), .d(op_b.d), .sh(op_b.sh),
                 .comp_en(op_b.comp_en), .p(ctr), .n1(s2), .n2(e2), .y(b_out), .clamped(b_clamp));

  // register bank 2 and output buffer
  logic          o_we;
  logic [AW-1:0] o_waddr;
  rgb_t          o_wdata;

  result_regbank #(.AW(AW)) u_rb2 (
    .clk, .rst_n,
    .in_valid(win_valid),
    .in_addr(AW'(win_i) * AW'(W) + AW'(win_j)),
    .in_r(r_out), .in_g(g_out), .in_b(b_out),
    .we(o_we), .waddr(o_waddr), .wdata(o_wdata)
  );

  sdp_ram #(.DEPTH(W * H), .WIDTH($bits(rgb_t))) u_out_buf (
    .clk, .we(o_we), .waddr(o_waddr), .wdata(o_wdata),
    .re(out_re), .raddr(out_addr), .rdata(out_data)
  );

  assign ev_mirror = rd_mirrored;
  assign ev_clamp  = win_valid && (g_clamp || r_clamp || b_clamp);
  assign ev_border = win_valid && ctr_border;

  // A centre is announced only with the last sample of its column.
  assert property (@(posedge clk) disable iff (!rst_n) ctr_valid |-> (smp_valid && smp_slot == 2'd3));

endmodule
