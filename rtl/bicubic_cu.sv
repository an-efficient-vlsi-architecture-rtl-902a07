// bicubic_cu: control unit of the two-pass 2x bi-cubic up-scaler for a
// W x H channel. Pass 0 (horizontal) takes each input row r and produces the
// 2W samples of that row: output column x lies at source position x/2, so
// its taps are columns x/2-1 .. x/2+2 and its fraction is 0 or 1/2; results
// go to the shared storage (H rows of 2W). Pass 1 (vertical) takes each
// column x of the shared storage and produces its 2H samples in the same way,
// writing them to the output memory (2H rows of 2W). Tap coordinates outside
// the image are reflected by boundary mirror machines.
//
// One tap is read per cycle, so one output sample takes 4 cycles: pass 0
// takes 8*W*H cycles, pass 1 16*W*H. One cycle after each read (the memory
// latency) the unit presents the tag of the returning tap: its pass, whether
// it is the fourth tap, and for the fourth the write address and phase of
// the result. Between the passes and before `done` it waits DRAIN cycles so
// that the last result is written. The tag carries the fraction as one bit, t_half,
// since a 2x scale only needs the fractions 0 and 1/2. Two passes, row first, follow the
// described architecture; the schedule is this design's choice.
module bicubic_cu
  import srd_pkg::*;
#(
  parameter int unsigned W  = 256,
  parameter int unsigned H  = 256,
  localparam int unsigned XW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned YW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned RW = (2 * W * H > 1) ? $clog2(2 * W * H) : 1,  // read address
  localparam int unsigned WW = $clog2(4 * W * H)                          // write address
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // tap read: pass 0 reads the input buffer, pass 1 the shared storage
  output logic                 rd_en,
  output logic                 rd_pass,
  output logic [RW-1:0]        rd_addr,
  output logic                 rd_mirrored,
  // tag of the tap returned this cycle
  output logic                 t_valid,
  output logic                 t_pass,
  output logic                 t_last,
  output logic [WW-1:0]        t_waddr,
  output logic                 t_half
);

  localparam int unsigned DRAIN = 3;
  localparam int unsigned CW    = ((XW > YW) ? XW : YW) + 2;   // counter width

  typedef enum logic [2:0] {S_IDLE, S_P0, S_D0, S_P1, S_D1} state_e;
  state_e state;

  logic [CW-1:0] o, n;          // pass 0: o = row r, n = column x; pass 1: o = column x, n = row y
  logic [1:0]    k;
  logic [1:0]    drain;
  logic          pass;

  logic [CW-1:0] o_last, n_last;
  logic          last_issue;

  assign pass   = (state == S_P1);
  assign o_last = pass ? CW'(2 * W - 1) : CW'(H - 1);
  assign n_last = pass ? CW'(2 * H - 1) : CW'(2 * W - 1);
  assign last_issue = (o == o_last) && (n == n_last) && (k == 2'd3);

  // tap position along the filtered direction
  logic signed [CW:0] v;
  logic [XW-1:0]      mx;
  logic [YW-1:0]      my;
  logic               mir_x, mir_y;

  assign v = $signed({2'b00, n[CW-1:1]}) - 1 + $signed({{(CW-1){1'b0}}, k});

  boundary_mirror #(.N(W)) u_bmm_x (.idx((XW+2)'(v)), .midx(mx), .mirrored(mir_x));
  boundary_mirror #(.N(H)) u_bmm_y (.idx((YW+2)'(v)), .midx(my), .mirrored(mir_y));

  assign rd_en       = (state == S_P0) || (state == S_P1);
  assign rd_pass     = pass;
  assign rd_addr     = pass ? RW'(my) * RW'(2 * W) + RW'(o)
                            : RW'(o) * RW'(W) + RW'(mx);
  assign rd_mirrored = rd_en && (pass ? mir_y : mir_x);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      o     <= '0;
      n     <= '0;
      k     <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_P0;
          o <= '0; n <= '0; k <= '0;
        end
        S_P0, S_P1: begin
          k <= k + 2'd1;
          if (k == 2'd3) begin
            if (n == n_last) begin
              n <= '0;
              o <= o + 1'b1;
            end else begin
              n <= n + 1'b1;
            end
          end
          if (last_issue) begin
            state <= (state == S_P0) ? S_D0 : S_D1;
            drain <= '0;
          end
        end
        S_D0, S_D1: begin
          drain <= drain + 2'd1;
          if (drain == 2'(DRAIN - 1)) begin
            if (state == S_D0) begin
              state <= S_P1;
              o <= '0; n <= '0; k <= '0;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      t_pass  <= 1'b0;
      t_last  <= 1'b0;
      t_waddr <= '0;
      t_half  <= 1'b0;
    end else begin
      t_valid <= rd_en;
      t_pass  <= pass;
      t_last  <= rd_en && (k == 2'd3);
      t_waddr <= pass ? WW'(n) * WW'(2 * W) + WW'(o)
                      : WW'(o) * WW'(2 * W) + WW'(n);
      t_half  <= n[0];
    end
  end

endmodule
