// Reference model for the SAD testbenches: a CU and a search area held as
// plain pixel arrays (column-major, [x][y]) and a direct, loop-based SAD.
// It shares nothing with the RTL beyond the pixel format.
package sad_ref_pkg;

  localparam int MAX_SA = 128;

  byte unsigned cu_px [32][32];          // [col][row]
  byte unsigned sa_px [MAX_SA][MAX_SA];  // [x][y]
  int sa_w, sa_h;

  function automatic void fill_random(int w, int h);
    sa_w = w;
    sa_h = h;
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) cu_px[x][y] = 8'($urandom);
    for (int x = 0; x < MAX_SA; x++)
      for (int y = 0; y < MAX_SA; y++) sa_px[x][y] = 8'($urandom);
  endfunction

  // SAD of the n x n block of the CU whose top-left is (bx, by), placed in
  // the search area so that the CU's top-left sits at (mx, my).
  function automatic int unsigned sad_block(int bx, int by, int n, int mx, int my);
    int unsigned s = 0;
    for (int x = 0; x < n; x++)
      for (int y = 0; y < n; y++) begin
        int a = cu_px[bx+x][by+y];
        int b = sa_px[mx+bx+x][my+by+y];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // Smallest SAD of a block over all CU positions with 0 <= mx <= w-cun,
  // 0 <= my <= h-cun.
  function automatic int unsigned min_block(int bx, int by, int n, int cun);
    int unsigned best = '1;
    for (int my = 0; my <= sa_h - cun; my++)
      for (int mx = 0; mx <= sa_w - cun; mx++) begin
        int unsigned s = sad_block(bx, by, n, mx, my);
        if (s < best) best = s;
      end
    return best;
  endfunction

endpackage
