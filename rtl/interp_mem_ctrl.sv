// interp_mem_ctrl: interpolation memory controller. It waits for the
// acknowledgement (`dm_done`) of the demosaicking machine, then reads the
// demosaicked {R, G, B} words one per cycle and writes their three bytes, at
// the same address, into the input buffers of the three per-channel bi-cubic
// interpolators. One cycle after the last write it pulses `bc_start`; when
// all three interpolators have reported done it pulses `done`. The copy
// takes NPIX + 2 cycles. Splitting into channels follows the description;
// the schedule is this design's choice.
module interp_mem_ctrl
  import srd_pkg::*;
#(
  parameter int unsigned NPIX = 65536,
  localparam int unsigned AW  = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dm_done,
  output logic          busy,
  output logic          done,
  // demosaicking output buffer read (one cycle latency)
  output logic          dm_re,
  output logic [AW-1:0] dm_addr,
  input  rgb_t          dm_data,
  // interpolator input buffers
  output logic          bc_we,
  output logic [AW-1:0] bc_addr,
  output pix_t          bc_r,
  output pix_t          bc_g,
  output pix_t          bc_b,
  output logic          bc_start,
  input  logic [2:0]    bc_done
);

  typedef enum logic [1:0] {S_IDLE, S_COPY, S_FLUSH, S_WAIT} state_e;
  state_e        state;
  logic [AW-1:0] a;
  logic [2:0]    got;

  assign dm_re   = (state == S_COPY);
  assign dm_addr = a;
  assign bc_r    = dm_data.r;
  assign bc_g    = dm_data.g;
  assign bc_b    = dm_data.b;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      a        <= '0;
      got      <= '0;
      bc_we    <= 1'b0;
      bc_addr  <= '0;
      bc_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      bc_we    <= dm_re;
      bc_addr  <= a;
      bc_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (dm_done) begin
          state <= S_COPY;
          a     <= '0;
        end
        S_COPY: begin
          if (32'(a) == NPIX - 1) state <= S_FLUSH;
          else                    a     <= a + 1'b1;
        end
        S_FLUSH: begin          // last write happens this cycle
          state    <= S_WAIT;
          bc_start <= 1'b1;
          got      <= '0;
        end
        S_WAIT: begin
          if ((got | bc_done) == 3'b111) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
          got <= got | bc_done;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
