// srd_pkg: types and constants shared by the super-resolution demosaicking
// (SRD) datapath. Pixels are 8-bit per colour; a full-colour pixel packs
// R, G and B into 24 bits with R in the most significant byte. The Bayer
// colour-filter-array class of a position is the two parity bits {i[0], j[0]}
// of its row and column: even/even is blue, odd/odd is red, the other two are
// green (on a blue row or on a red row). Cubic weights are signed fixed point
// with COEF_FRAC fraction bits (1.0 = 256).
package srd_pkg;

  localparam int unsigned PIX_W     = 8;
  localparam int unsigned COEF_FRAC = 8;
  localparam int unsigned COEF_W    = 12;

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  typedef enum logic [1:0] {
    CFA_B  = 2'b00,   // even row, even column
    CFA_GB = 2'b01,   // green on a blue row
    CFA_GR = 2'b10,   // green on a red row
    CFA_R  = 2'b11    // odd row, odd column
  } cfa_e;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Pick the sample a Bayer sensor would have recorded at a position of the
  // given class from a full-colour pixel.
  function automatic pix_t cfa_sample(rgb_t px, cfa_e c);
    unique case (c)
      CFA_R:   return px.r;
      CFA_B:   return px.b;
      default: return px.g;
    endcase
  endfunction

endpackage
