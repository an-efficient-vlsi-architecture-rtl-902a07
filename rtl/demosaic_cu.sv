// demosaic_cu: control unit of the colour demosaicking machine. It walks the
// image row by row. For centre row i it slides a 4-column window from
// virtual column -1 to W+1; for every column it reads the four rows i-1..i+2
// from the input buffer, one read per cycle, with both coordinates passed
// through the boundary mirror machine so that reads past the border fetch the
// reflected pixel. One cycle after each read (the buffer latency) it presents
// the tag of the returning sample: its slot in the column, its mirrored
// position (for the boundary detector) and, on the last slot of a column
// from virtual column 2 on, the centre pixel (i, c-2) whose window that
// column completes. A row takes 4*(W+3) cycles, a frame 4*(W+3)*H. After the
// last read the unit waits DRAIN cycles for the datapath to write the last
// pixel and then pulses `done`, the acknowledgement of a finished frame. The
// scan order and schedule are this design's choice.
module demosaic_cu #(
  parameter int unsigned W = 256,
  parameter int unsigned H = 256,
  localparam int unsigned XW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned YW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned AW = (W * H > 1) ? $clog2(W * H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // input buffer read
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          rd_mirrored,
  // tag of the sample returned this cycle
  output logic          smp_valid,
  output logic [1:0]    smp_slot,
  output logic [YW-1:0] smp_row,
  output logic [XW-1:0] smp_col,
  output logic          ctr_valid,   // window complete for the centre below
  output logic [YW-1:0] ctr_i,
  output logic [XW-1:0] ctr_j
);

  localparam int unsigned DRAIN = 4;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [YW-1:0]          i;
  logic signed [XW+1:0]   c;     // virtual column -1 .. W+1
  logic [1:0]             r;
  logic [2:0]             drain;

  logic signed [YW+1:0]   vrow;
  logic [YW-1:0]          mrow;
  logic [XW-1:0]          mcol;
  logic                   mir_r, mir_c;
  logic                   last_issue;

  assign vrow = $signed({2'b00, i}) - 1 + $signed({{YW{1'b0}}, r});

  boundary_mirror #(.N(H)) u_bmm_row (.idx(vrow), .midx(mrow), .mirrored(mir_r));
  boundary_mirror #(.N(W)) u_bmm_col (.idx(c),    .midx(mcol), .mirrored(mir_c));

  assign rd_en       = (state == S_RUN);
  assign rd_addr     = AW'(mrow) * AW'(W) + AW'(mcol);
  assign rd_mirrored = rd_en && (mir_r || mir_c);
  assign busy        = (state != S_IDLE);
  assign last_issue  = (32'(i) == H - 1) && (c == (XW+2)'(W + 1)) && (r == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
      c     <= -1;
      r     <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          i     <= '0;
          c     <= -1;
          r     <= '0;
        end
        S_RUN: begin
          r <= r + 2'd1;
          if (r == 2'd3) begin
            if (c == (XW+2)'(W + 1)) begin
              c <= -1;
              i <= i + 1'b1;
            end else begin
              c <= c + 1'b1;
            end
          end
          if (last_issue) begin
            state <= S_DRAIN;
            drain <= '0;
          end
        end
        S_DRAIN: begin
          drain <= drain + 3'd1;
          if (drain == 3'(DRAIN - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // tag pipeline, aligned with the read data of the buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_valid <= 1'b0;
      smp_slot  <= '0;
      smp_row   <= '0;
      smp_col   <= '0;
      ctr_valid <= 1'b0;
      ctr_i     <= '0;
      ctr_j     <= '0;
    end else begin
      smp_valid <= rd_en;
      smp_slot  <= r;
      smp_row   <= mrow;
      smp_col   <= mcol;
      ctr_valid <= rd_en && (r == 2'd3) && (c >= 2);
      ctr_i     <= i;
      ctr_j     <= XW'(c - 2);
    end
  end

endmodule
