// shape_ref_pkg: reference models used by the testbenches to compute
// expected results independently of the RTL: the binary arithmetic coder,
// the intra-CAE context and bordering rules, up/down-sampling, the
// accepted-quality test and the conversion-ratio decision. They are written
// from the pixel definitions (coordinates and loops), not from the RTL's
// shift chains.
package shape_ref_pkg;
  import shape_pkg::*;

  class BacModel;
    longint low, range;
    int     follow;
    bit     q[$];
    function new(); low = 0; range = 64'hFFFF_FFFF; follow = 0; endfunction
    function void put(bit b);
      q.push_back(b);
      repeat (follow) q.push_back(!b);
      follow = 0;
    endfunction
    function void encode(bit b, int p0);
      bit lps; longint plps, rlps;
      lps  = (p0 > 32768);
      plps = lps ? 65536 - p0 : p0;
      rlps = (range >> 16) * plps;
      if (rlps == 0) rlps = 1;
      if (b == lps) range = rlps;
      else begin low += rlps; range -= rlps; end
      while (range <= 64'h4000_0000) begin
        if (low >= 64'h8000_0000) begin put(1); low -= 64'h8000_0000; end
        else if (low + range <= 64'h8000_0000) put(0);
        else begin follow++; low -= 64'h4000_0000; end
        low   = low * 2;
        range = range * 2;
      end
    endfunction
    function void flush();
      follow++;
      put(low >= 64'h4000_0000);
    endfunction
  endclass

  function automatic int blk_n(cr_e c);
    return (c == CR_1_2) ? 8 : (c == CR_1_4) ? 4 : 16;
  endfunction

  // bordered pixel for intra CAE: top/left/top-right border 0, right border
  // inside the block repeats the rightmost pixel
  function automatic bit cae_pix(bab_t b, int n, int x, int y);
    if (y < 0 || x < 0) return 0;
    if (x >= n) return b[y][n-1];
    return b[y][x];
  endfunction

  function automatic int cae_context(bab_t b, int n, int x, int y);
    int c;
    c = 0;
    c |= int'(cae_pix(b, n, x-1, y  )) << 0;
    c |= int'(cae_pix(b, n, x-2, y  )) << 1;
    c |= int'(cae_pix(b, n, x+2, y-1)) << 2;
    c |= int'(cae_pix(b, n, x+1, y-1)) << 3;
    c |= int'(cae_pix(b, n, x  , y-1)) << 4;
    c |= int'(cae_pix(b, n, x-1, y-1)) << 5;
    c |= int'(cae_pix(b, n, x-2, y-1)) << 6;
    c |= int'(cae_pix(b, n, x+1, y-2)) << 7;
    c |= int'(cae_pix(b, n, x  , y-2)) << 8;
    c |= int'(cae_pix(b, n, x-1, y-2)) << 9;
    return c;
  endfunction

  // code bits of one block
  function automatic void cae_model(bab_t b, int n, int prob[1024], ref bit bits[$]);
    BacModel m;
    m = new();
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++)
        m.encode(b[y][x], prob[cae_context(b, n, x, y)]);
    m.flush();
    bits = m.q;
  endfunction

  function automatic bit lo_pix(logic [7:0][7:0] lo, int n, int x, int y);
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    if (x >= n) x = n-1;
    if (y >= n) y = n-1;
    return lo[y][x];
  endfunction

  // upsample n x n -> 2n x 2n
  function automatic bab_t upsample_model(logic [7:0][7:0] lo, int n, int th[256]);
    bab_t hi;
    // template letters as (column, row) offsets from A
    int dcx[12] = '{0, 1, 0, 1,  0, 1, 2, 2, 1, 0, -1, -1};  // A B C D E F G H I J K L
    int dcy[12] = '{0, 0, 1, 1, -1,-1, 0, 1, 2, 2,  1,  0};
    hi = '0;
    for (int yc = -1; yc < n; yc++)
      for (int xc = -1; xc < n; xc++)
        for (int p = 0; p < 4; p++) begin
          int mh, mv, ox, oy, sum, cf;
          bit v[12];
          mh = p % 2; mv = p / 2;
          for (int t = 0; t < 12; t++) begin
            int cx, cy;
            cx = mh ? 1 - dcx[t] : dcx[t];
            cy = mv ? 1 - dcy[t] : dcy[t];
            v[t] = lo_pix(lo, n, xc + cx, yc + cy);
          end
          sum = 4*v[0] + 2*(v[1]+v[2]+v[3]);
          cf  = 0;
          for (int t = 4; t < 12; t++) begin
            sum += v[t];
            cf = cf * 2 + v[t];
          end
          ox = 2*xc + 1 + mh;
          oy = 2*yc + 1 + mv;
          if (ox >= 0 && oy >= 0 && ox < 2*n && oy < 2*n) hi[oy][ox] = (sum > th[cf]);
        end
    return hi;
  endfunction

  function automatic logic [7:0][7:0] downsample_model(bab_t b, int f);
    logic [7:0][7:0] lo;
    lo = '0;
    for (int y = 0; y < 16/f; y++)
      for (int x = 0; x < 16/f; x++) begin
        int c;
        c = 0;
        for (int v = 0; v < f; v++)
          for (int u = 0; u < f; u++) c += b[f*y+v][f*x+u];
        lo[y][x] = (2*c >= f*f);
      end
    return lo;
  endfunction

  function automatic bit acq_model(bab_t a, bab_t b, int thr);
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++) begin
        int e;
        e = 0;
        for (int v = 0; v < 4; v++)
          for (int u = 0; u < 4; u++) e += (a[4*by+v][4*bx+u] != b[4*by+v][4*bx+u]);
        if (e > thr) return 0;
      end
    return 1;
  endfunction

  function automatic void size_conv_model(bab_t b, int thr, int th[256],
                                          output cr_e cr, output bab_t conv);
    logic [7:0][7:0] l4, l2, l8;
    bab_t h8, h16;
    l4  = downsample_model(b, 4);
    h8  = upsample_model(l4, 4, th);
    l8  = '0;
    for (int y = 0; y < 8; y++) l8[y] = h8[y][7:0];
    h16 = upsample_model(l8, 8, th);
    conv = '0;
    if (acq_model(b, h16, thr)) begin
      cr = CR_1_4;
      for (int y = 0; y < 4; y++) conv[y][3:0] = l4[y][3:0];
      return;
    end
    l2  = downsample_model(b, 2);
    h16 = upsample_model(l2, 8, th);
    if (acq_model(b, h16, thr)) begin
      cr = CR_1_2;
      for (int y = 0; y < 8; y++) conv[y][7:0] = l2[y];
      return;
    end
    cr = CR_1;
    conv = b;
  endfunction

  // a plausible threshold table: more opaque neighbours lower the bar
  function automatic int default_th(int cf);
    return 9 - ($countones(cf) > 4 ? 1 : 0);
  endfunction
endpackage
