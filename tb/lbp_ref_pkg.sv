// lbp_ref_pkg: reference model for the testbenches of the LBP CVIs.
//
// Holds one image stripe in extended coordinates (column i is the pixel
// i - HALO columns from the stripe's left edge, row 0 is the first row of a
// pass) and computes, straight from the pixels, block sums, MB-LBP patterns
// and feature scores. Pixels outside the stored rows (row < 0) or past the
// right end of the extended row read as zero, as in the hardware.
package lbp_ref_pkg;

  localparam int MAX_H = 256;
  localparam int MAX_W = 352;

  int img [MAX_H][MAX_W];
  int img_h = 0;
  int img_w = 0;

  function automatic void fill_random(int h, int w);
    img_h = h;
    img_w = w;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) img[y][x] = int'($urandom_range(0, 255));
  endfunction

  function automatic int pix(int y, int x);
    if (y < 0 || y >= img_h || x < 0 || x >= img_w) return 0;
    return img[y][x];
  endfunction

  // Sum of the s x s block whose top-left pixel is (y, x).
  function automatic int bsum(int y, int x, int s);
    int t = 0;
    for (int dy = 0; dy < s; dy++)
      for (int dx = 0; dx < s; dx++) t += pix(y + dy, x + dx);
    return t;
  endfunction

  // MB-LBP pattern whose centre block has its top-left pixel at (yc, xc).
  // Bit 7 top-left, then clockwise; bit 0 left. Neighbour >= centre gives 1.
  function automatic logic [7:0] lbp(int yc, int xc, int s);
    int c;
    logic [7:0] p;
    c = bsum(yc, xc, s);
    p[7] = bsum(yc - s, xc - s, s) >= c;
    p[6] = bsum(yc - s, xc,     s) >= c;
    p[5] = bsum(yc - s, xc + s, s) >= c;
    p[4] = bsum(yc,     xc + s, s) >= c;
    p[3] = bsum(yc + s, xc + s, s) >= c;
    p[2] = bsum(yc + s, xc,     s) >= c;
    p[1] = bsum(yc + s, xc - s, s) >= c;
    p[0] = bsum(yc,     xc - s, s) >= c;
    return p;
  endfunction

  // Score of one feature: {lut[255:0], pass[7:0], fail[7:0]}.
  function automatic logic [7:0] score(logic [271:0] f, logic [7:0] pat);
    return f[16 + pat] ? f[15:8] : f[7:0];
  endfunction

endpackage
