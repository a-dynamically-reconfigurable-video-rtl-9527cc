// ref_pkg: real-valued reference models used by the testbenches.
//
// The DCT here is the textbook double-precision 8x8 DCT-II with the
// 1/4*c(u)*c(v) normalisation, the zigzag order is generated by walking the
// anti-diagonals, and the quantiser follows the rule stated in dctq.  None of
// it shares code with the RTL, so a bit-accurate RTL result is expected to
// agree within rounding (+-1).
package ref_pkg;
  localparam real PI = 3.14159265358979323846;

  typedef int   blk_t [64];
  typedef real  rblk_t [64];

  function automatic real cu(input int u);
    return (u == 0) ? 0.70710678118654752 : 1.0;
  endfunction

  function automatic rblk_t fdct(input blk_t x);
    rblk_t f;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real s = 0.0;
        for (int y = 0; y < 8; y++)
          for (int xx = 0; xx < 8; xx++)
            s += x[y*8+xx] * $cos((2*xx+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        f[v*8+u] = 0.25 * cu(u) * cu(v) * s;
      end
    return f;
  endfunction

  function automatic rblk_t idct(input blk_t f);
    rblk_t x;
    for (int y = 0; y < 8; y++)
      for (int xx = 0; xx < 8; xx++) begin
        real s = 0.0;
        for (int v = 0; v < 8; v++)
          for (int u = 0; u < 8; u++)
            s += 0.25 * cu(u) * cu(v) * f[v*8+u] * $cos((2*xx+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        x[y*8+xx] = s;
      end
    return x;
  endfunction

  // raster position of zigzag index k: walk the anti-diagonals d = r+c
  function automatic int zz(input int k);
    int n = 0;
    for (int d = 0; d < 15; d++)
      for (int i = 0; i <= d; i++) begin
        int r = (d % 2 == 0) ? d - i : i;
        int c = d - r;
        if (r < 8 && c < 8) begin
          if (n == k) return r * 8 + c;
          n++;
        end
      end
    return -1;
  endfunction

  function automatic int qstep(input int k, input bit intra, input int qs);
    if (intra && k == 0) return 8;
    return (qs == 0) ? 2 : 2 * qs;
  endfunction

  function automatic int quant(input int c, input int q, input bit intra);
    int m = (c < 0) ? -c : c;
    int l = intra ? (m + q / 2) / q : m / q;
    return (c < 0) ? -l : l;
  endfunction

  function automatic int rnd(input real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction
endpackage
