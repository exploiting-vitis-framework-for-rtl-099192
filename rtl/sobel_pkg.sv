// sobel_pkg: types, sizes and arithmetic shared by the Sobel edge-detection kernels.
//
// Pixels travel through global memory packed into wide bus words. An RGB pixel
// takes 32 bits (red in bits 7:0, green in 15:8, blue in 23:16, bits 31:24
// unused); a gray or edge pixel takes one byte. The gray conversion uses the
// integer weights 19/37/7 and a divide by 64, as in the design's
// specification; the 3x3 Sobel operator and the thresholding of the gradient
// magnitude are collected here too so that the kernels and the testbenches'
// reference models compute the same thing.
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;   // gray / edge pixel
  localparam int unsigned RGB_W  = 32;  // packed RGB pixel
  localparam int unsigned DIM_W  = 16;  // width / height arguments
  localparam int unsigned SIZE_W = 32;  // pixel-count argument
  localparam int unsigned THR_W  = 16;  // threshold T
  localparam int unsigned MAG_W  = 11;  // |Gx|+|Gy| <= 2040

  // Gray conversion weights, p_g = (19 R + 37 G + 7 B) / 64
  localparam int unsigned GRAY_WR    = 19;
  localparam int unsigned GRAY_WG    = 37;
  localparam int unsigned GRAY_WB    = 7;
  localparam int unsigned GRAY_SHIFT = 6;

  localparam logic [PIX_W-1:0] EDGE_ON  = 8'hFF;
  localparam logic [PIX_W-1:0] EDGE_OFF = 8'h00;

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    logic [7:0] unused;
    logic [7:0] b;
    logic [7:0] g;
    logic [7:0] r;
  } rgb_t;

  // One column of the 3x3 window: top (row y-1), mid (row y), bot (row y+1)
  typedef struct packed {
    pix_t top;
    pix_t mid;
    pix_t bot;
  } col_t;

  function automatic pix_t gray_of(rgb_t p);
    logic [13:0] s;  // 255 * 63 = 16065 fits in 14 bits
    s = 14'(GRAY_WR) * 14'(p.r) + 14'(GRAY_WG) * 14'(p.g) + 14'(GRAY_WB) * 14'(p.b);
    return s[13:GRAY_SHIFT];
  endfunction

  function automatic logic [MAG_W-1:0] abs12(logic signed [11:0] v);
    logic [11:0] a;
    a = v[11] ? 12'(-v) : 12'(v);
    return a[MAG_W-1:0];
  endfunction

  // |Gx| + |Gy| over the window whose columns are l (x-1), m (x), r (x+1).
  // Gx uses the kernel [+1 0 -1; +2 0 -2; +1 0 -1]; Gy is its transpose.
  function automatic logic [MAG_W-1:0] sobel_mag(col_t l, col_t m, col_t r);
    logic signed [11:0] gx, gy;
    logic [MAG_W:0] sum;
    gx = (12'(l.top) + 12'({l.mid, 1'b0}) + 12'(l.bot))
       - (12'(r.top) + 12'({r.mid, 1'b0}) + 12'(r.bot));
    gy = (12'(l.top) + 12'({m.top, 1'b0}) + 12'(r.top))
       - (12'(l.bot) + 12'({m.bot, 1'b0}) + 12'(r.bot));
    sum = {1'b0, abs12(gx)} + {1'b0, abs12(gy)};
    return sum[MAG_W-1:0];
  endfunction

  function automatic pix_t edge_of(col_t l, col_t m, col_t r, logic [THR_W-1:0] thr);
    return ({5'b0, sobel_mag(l, m, r)} > thr) ? EDGE_ON : EDGE_OFF;
  endfunction

endpackage
