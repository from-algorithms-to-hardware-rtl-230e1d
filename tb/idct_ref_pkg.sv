// idct_ref_pkg: floating-point reference for the IDCT testbenches.
// gen_block makes a coefficient block the way the IEEE 1180-1990 accuracy
// test does: random pixels in [-lo, hi] (optionally sign-inverted), forward
// 8x8 DCT in floating point, rounded to integers and clipped to 12 bits.
// ref_idct gives the floating-point 2D-IDCT of a coefficient block, rounded
// and clipped to 9 bits. Both are computed separably with a cosine table.
package idct_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  typedef int  blk_t [64];
  typedef real rblk_t [64];

  // t[x*8+u] = c(u) * cos((2x+1) u pi / 16) / 2, c(0) = 1/sqrt(2), else 1
  function automatic rblk_t cos_table();
    rblk_t t;
    for (int x = 0; x < 8; x++)
      for (int u = 0; u < 8; u++)
        t[x * 8 + u] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) *
                       $cos((2 * x + 1) * u * PI / 16.0) / 2.0;
    return t;
  endfunction

  function automatic int round_clip(real s, int lo, int hi);
    int r = (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  function automatic blk_t gen_block(int lo, int hi, bit invert = 0);
    rblk_t t = cos_table();
    real pix [64], tmp [64];
    blk_t coef;
    for (int i = 0; i < 64; i++) begin
      pix[i] = $signed($urandom_range(0, lo + hi)) - lo;
      if (invert) pix[i] = -pix[i];
    end
    for (int x = 0; x < 8; x++)          // rows: tmp[x][v]
      for (int v = 0; v < 8; v++) begin
        real s = 0.0;
        for (int y = 0; y < 8; y++) s += pix[x * 8 + y] * t[y * 8 + v];
        tmp[x * 8 + v] = s;
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real s = 0.0;
        for (int x = 0; x < 8; x++) s += tmp[x * 8 + v] * t[x * 8 + u];
        coef[u * 8 + v] = round_clip(s, -2048, 2047);
      end
    return coef;
  endfunction

  function automatic rblk_t ref_idct_real(blk_t coef);
    rblk_t t = cos_table();
    real tmp [64];
    rblk_t pix;
    for (int u = 0; u < 8; u++)          // rows: tmp[u][y]
      for (int y = 0; y < 8; y++) begin
        real s = 0.0;
        for (int v = 0; v < 8; v++) s += coef[u * 8 + v] * t[y * 8 + v];
        tmp[u * 8 + y] = s;
      end
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        real s = 0.0;
        for (int u = 0; u < 8; u++) s += tmp[u * 8 + y] * t[x * 8 + u];
        pix[x * 8 + y] = s;
      end
    return pix;
  endfunction

  function automatic blk_t ref_idct(blk_t coef);
    rblk_t p = ref_idct_real(coef);
    blk_t pix;
    for (int i = 0; i < 64; i++) pix[i] = round_clip(p[i], -256, 255);
    return pix;
  endfunction
endpackage
