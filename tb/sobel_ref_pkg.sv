// sobel_ref_pkg: reference model of the Sobel accelerator for testbenches.
//
// Works on whole frames held in dynamic arrays, pixel by pixel and with
// none of the hardware's packing, line buffers or scheduling:
// gray = (19 R + 37 G + 7 B) >> 6, the edge pixel of an interior position is
// 0xFF when |Gx| + |Gy| > T (Gx with kernel [1 0 -1; 2 0 -2; 1 0 -1], Gy its
// transpose), and each border pixel copies its nearest interior pixel.
package sobel_ref_pkg;

  function automatic byte unsigned ref_gray(int unsigned rgb);
    int unsigned r, g, b;
    r = rgb & 32'hFF;
    g = (rgb >> 8) & 32'hFF;
    b = (rgb >> 16) & 32'hFF;
    return byte'((19 * r + 37 * g + 7 * b) / 64);
  endfunction

  // gray: width*height bytes in raster order; returns the interior edge value
  function automatic byte unsigned ref_edge(const ref byte unsigned gray[], int w,
                                            int y, int x, int t);
    int gx, gy, p[3][3];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        p[dy+1][dx+1] = int'(gray[(y + dy) * w + (x + dx)]);
    gx = (p[0][0] + 2 * p[1][0] + p[2][0]) - (p[0][2] + 2 * p[1][2] + p[2][2]);
    gy = (p[0][0] + 2 * p[0][1] + p[0][2]) - (p[2][0] + 2 * p[2][1] + p[2][2]);
    if (gx < 0) gx = -gx;
    if (gy < 0) gy = -gy;
    return (gx + gy > t) ? 8'hFF : 8'h00;
  endfunction

  // Complete edge image, border included
  function automatic void ref_frame(const ref byte unsigned gray[], int w, int h, int t,
                                    ref byte unsigned ee[]);
    ee = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int sy, sx;
        sy = (y < 1) ? 1 : (y > h - 2) ? h - 2 : y;
        sx = (x < 1) ? 1 : (x > w - 2) ? w - 2 : x;
        ee[y * w + x] = ref_edge(gray, w, sy, sx, t);
      end
  endfunction

endpackage
