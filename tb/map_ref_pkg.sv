// map_ref_pkg: integer reference functions shared by the block testbenches.
// They restate the decoder's arithmetic with unbounded integers and real
// math: the max* correction round(4*ln(1+exp(-|d|/4))), two-input max*, the
// two-stage radix-4 max* approximation, and the CCSDS 16-state trellis
// (state {r1,r2,r3,r4}, feedback a = u^r3^r4, parity a^r1^r3^r4).
package map_ref_pkg;
  function automatic int lutf(int d);
    real r;
    if (d < 0) d = -d;
    r = 4.0 * $ln(1.0 + $exp(-$itor(d) / 4.0));
    return int'($floor(r + 0.5));
  endfunction
  function automatic int mstar(int x, int y);
    return ((x >= y) ? x : y) + lutf(x - y);
  endfunction
  // Radix-4 max* of pairs (c0,c1) and (c2,c3); d2 = pair-0 max - pair-1 max.
  function automatic int archc(int c0, int c1, int c2, int c3, output int d2);
    int m01, m23;
    m01 = (c0 >= c1) ? c0 : c1;
    m23 = (c2 >= c3) ? c2 : c3;
    d2  = m01 - m23;
    return ((d2 >= 0) ? m01 : m23) + lutf(d2) + ((d2 >= 0) ? lutf(c0 - c1) : lutf(c2 - c3));
  endfunction
  function automatic int nsf(int s, int u);
    int a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return (a << 3) | (s >> 1);
  endfunction
  function automatic int parf(int s, int u);
    int a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ ((s >> 3) & 1) ^ ((s >> 1) & 1) ^ (s & 1);
  endfunction
  // Wrap an integer to a signed field of w bits.
  function automatic int wrap(int v, int w);
    int m = 1 << w;
    v = v % m;
    if (v < 0) v += m;
    if (v >= m / 2) v -= m;
    return v;
  endfunction
endpackage
