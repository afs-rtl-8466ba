// tb_sc_ref_pkg: reference models of the three syndrome-compression packet
// formats, written independently of the RTL for the testbenches.  A syndrome
// round has NS = 2*d*(d-1) bits, X ancillas first; formats:
//   DZC      : K = ceil(NS/W) zero-indicator bits (1 = block zero), then the
//              non-zero W-bit blocks in block order.
//   sparse   : SRB (1 = all zero), then ceil(log2 NS)-bit indices of the ones.
//   Geo-Comp : zero-indicator bit per GH x GW tile, then the non-zero tiles,
//              each X bits row-major followed by Z bits row-major.
package tb_sc_ref_pkg;

  localparam int unsigned MAXB = 2048;
  typedef bit [MAXB-1:0] bits_t;

  function automatic void ref_dzc(input int d, input int w, input bits_t s,
                                  output bits_t p, output int len);
    int ns, k, pos;
    ns  = 2 * d * (d - 1);
    k   = (ns + w - 1) / w;
    p   = '0;
    pos = k;
    for (int i = 0; i < k; i++) begin
      bit z;
      z = 1;
      for (int j = 0; j < w; j++) if (i * w + j < ns && s[i * w + j]) z = 0;
      p[i] = z;
      if (!z) begin
        for (int j = 0; j < w; j++) p[pos + j] = (i * w + j < ns) ? s[i * w + j] : 1'b0;
        pos += w;
      end
    end
    len = pos;
  endfunction

  function automatic void ref_sparse(input int d, input bits_t s, output bits_t p, output int len);
    int ns, iw, pos;
    ns  = 2 * d * (d - 1);
    iw  = $clog2(ns);
    p   = '0;
    pos = 1;
    p[0] = 1;
    for (int i = 0; i < ns; i++) begin
      if (s[i]) begin
        p[0] = 0;
        for (int j = 0; j < iw; j++) p[pos + j] = (i >> j) & 1;
        pos += iw;
      end
    end
    len = pos;
  endfunction

  function automatic void ref_geo(input int d, input int gh, input int gw, input bits_t s,
                                  output bits_t p, output int len);
    int r, c, tr, tc, kg, pos;
    r  = d;
    c  = d - 1;
    tr = (r + gh - 1) / gh;
    tc = (c + gw - 1) / gw;
    kg = tr * tc;
    p  = '0;
    pos = kg;
    for (int b = 0; b < kg; b++) begin
      bit blk [64];
      bit nz;
      nz = 0;
      for (int i = 0; i < 2 * gh * gw; i++) blk[i] = 0;
      for (int i = 0; i < gh; i++)
        for (int j = 0; j < gw; j++) begin
          int rr, cc;
          rr = (b / tc) * gh + i;
          cc = (b % tc) * gw + j;
          if (rr < r && cc < c) begin
            blk[i * gw + j]           = s[rr * c + cc];
            blk[gh * gw + i * gw + j] = s[r * c + rr * c + cc];
          end
        end
      for (int i = 0; i < 2 * gh * gw; i++) nz |= blk[i];
      p[b] = !nz;
      if (nz) begin
        for (int i = 0; i < 2 * gh * gw; i++) p[pos + i] = blk[i];
        pos += 2 * gh * gw;
      end
    end
    len = pos;
  endfunction

  // Random syndrome round with about `ones` set bits.
  function automatic bits_t rand_round(input int d, input int ones);
    bits_t s;
    int ns;
    ns = 2 * d * (d - 1);
    s = '0;
    for (int i = 0; i < ones; i++) s[$urandom_range(ns - 1)] = 1'b1;
    return s;
  endfunction

endpackage
