// bd_ref_pkg - behavioural reference model of the boundary detector, for the
// testbenches. It is written independently of the RTL: the path set is
// rebuilt here from the primitive shapes by applying the 8 symmetries of the
// square and removing duplicates, and every criterion is evaluated on whole
// images held in dynamic arrays (row-major, index r*LINE + c).
package bd_ref_pkg;

  int unsigned path_mask [$];   // 9-bit masks, bit 3*r+c
  bit          paths_built = 0;

  function automatic int unsigned xform(int unsigned m, int k);
    int unsigned o = 0;
    for (int i = 0; i < 9; i++) begin
      if (m[i]) begin
        int r = i / 3, c = i % 3, t;
        for (int q = 0; q < k % 4; q++) begin t = r; r = c; c = 2 - t; end
        if (k >= 4) c = 2 - c;
        o |= 1 << (3*r + c);
      end
    end
    return o;
  endfunction

  function automatic void build_paths();
    // primitive shapes, as (row,col) lists encoded into masks
    int unsigned prim [9];
    if (paths_built) return;
    prim[0] = 1 << 0;                                   // corner
    prim[1] = (1 << 0) | (1 << 3);                      // (0,0)(1,0)
    prim[2] = (1 << 3) | (1 << 1);                      // (1,0)(0,1)
    prim[3] = (1 << 1) | (1 << 4) | (1 << 7);           // centre column
    prim[4] = (1 << 0) | (1 << 4) | (1 << 8);           // diagonal
    prim[5] = (1 << 0) | (1 << 4) | (1 << 7);           // knee through centre
    prim[6] = (1 << 0) | (1 << 3) | (1 << 7);           // knee along edge
    prim[7] = (1 << 0) | (1 << 3) | (1 << 6);           // edge column
    prim[8] = (1 << 0) | (1 << 1) | (1 << 5) | (1 << 8);// corner arc
    foreach (prim[p])
      for (int k = 0; k < 8; k++) begin
        int unsigned m = xform(prim[p], k);
        bit dup = 0;
        foreach (path_mask[i]) if (path_mask[i] == m) dup = 1;
        if (!dup) path_mask.push_back(m);
      end
    paths_built = 1;
  endfunction

  function automatic int popc(int unsigned m);
    int n = 0;
    for (int i = 0; i < 9; i++) n += m[i];
    return n;
  endfunction

  function automatic int path_value(int unsigned m, int w[9]);
    int s = 0;
    for (int i = 0; i < 9; i++) if (m[i]) s += w[i];
    return s * 12 / popc(m);
  endfunction

  // Pathfinder I: centre on one of the RANK best of all 44 paths.
  function automatic bit pf1_ok(int w[9], int rank = 6);
    int best = -1, better = 0;
    build_paths();
    foreach (path_mask[i])
      if (path_mask[i][4] && path_value(path_mask[i], w) > best) best = path_value(path_mask[i], w);
    foreach (path_mask[i])
      if (path_value(path_mask[i], w) > best) better++;
    return better < rank;
  endfunction

  // Pathfinder II: the best path of >= 3 pixels goes through the centre;
  // equal best values are settled by comparing the upper-right and lower-left
  // corner triples. Returns 1 for a border pixel; tie set when values were equal.
  function automatic bit pf2_on(int w[9], output bit tie);
    int bc = -1, bo = -1;
    build_paths();
    foreach (path_mask[i]) begin
      if (popc(path_mask[i]) < 3) continue;
      if (path_mask[i][4]) begin if (path_value(path_mask[i], w) > bc) bc = path_value(path_mask[i], w); end
      else                 begin if (path_value(path_mask[i], w) > bo) bo = path_value(path_mask[i], w); end
    end
    tie = (bc == bo);
    if (bc > bo) return 1;
    if (bc < bo) return 0;
    return (w[1] + w[2] + w[5]) > (w[3] + w[6] + w[7]);
  endfunction

  // Local maximum on a 5x5 window (index 5*r+c): centre above pct % of full
  // scale and fewer than top_n neighbours >= centre.
  function automatic bit lm_ok(int w[25], int bits, int top_n = 5, int pct = 10);
    int ge = 0;
    for (int i = 0; i < 25; i++) if (i != 12 && w[i] >= w[12]) ge++;
    return (w[12] * 100 > ((1 << bits) - 1) * pct) && (ge < top_n);
  endfunction

  function automatic int px(const ref int img[], input int L, int R, int r, int c);
    if (r < 0 || r >= R || c < 0 || c >= L) return 0;
    return img[r*L + c];
  endfunction

  function automatic void win3(const ref int img[], input int L, int R, int r, int c, output int w[9]);
    for (int i = 0; i < 9; i++) w[i] = px(img, L, R, r - 1 + i/3, c - 1 + i%3);
  endfunction

  // Roberts gradient, saturated to bits; 0 in the first row and column.
  function automatic void ref_gradient(const ref int img[], input int L, int R, int bits, ref int g[]);
    g = new[L*R];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < L; c++) begin
        int v;
        if (r == 0 || c == 0) v = 0;
        else begin
          int a = img[(r-1)*L + c-1] - img[r*L + c];
          int b = img[(r-1)*L + c]   - img[r*L + c-1];
          v = (a < 0 ? -a : a) + (b < 0 ? -b : b);
          if (v > (1 << bits) - 1) v = (1 << bits) - 1;
        end
        g[r*L + c] = v;
      end
  endfunction

  // Local maximum & pathfinder I stage.
  function automatic void ref_stage2(const ref int g[], input int L, int R, int bits, ref int o[]);
    o = new[L*R];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < L; c++) begin
        int w5[25]; int w[9];
        for (int i = 0; i < 25; i++) w5[i] = px(g, L, R, r - 2 + i/5, c - 2 + i%5);
        win3(g, L, R, r, c, w);
        o[r*L + c] = (lm_ok(w5, bits) && pf1_ok(w)) ? g[r*L + c] : 0;
      end
  endfunction

  // Pathfinder II stage; binary=1 gives 0/1, else the kept grey value.
  function automatic void ref_pf2(const ref int in[], input int L, int R, bit binary, ref int o[]);
    o = new[L*R];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < L; c++) begin
        int w[9]; bit tie, on;
        win3(in, L, R, r, c, w);
        on = pf2_on(w, tie);
        o[r*L + c] = !on ? 0 : (binary ? 1 : in[r*L + c]);
      end
  endfunction

  // Test image: a bright tilted bar (half-width hw, slope num/den) with a
  // notch, over a darker background with a little noise; values in 0..2^bits-1.
  function automatic void make_shape(int L, int R, int bits, int kind, ref int img[]);
    int full = (1 << bits) - 1;
    img = new[L*R];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < L; c++) begin
        int v;
        // distance of (r,c) from the line r = R/2 + (c - L/2) * kind / 3, scaled
        int d = 3 * (r - R/2) - (c - L/2) * (kind % 4);
        bit in_bar = (d < 0 ? -d : d) <= 3 * (R / 5 + 1) && c > L/8 && c < L - L/8 - 1;
        bit notch  = (c > L/2 - 2) && (c < L/2 + 2) && (r < R/2);
        v = (in_bar && !notch) ? full - (full / 8) : full / 10;
        v += $urandom % (full / 16 + 1);
        if (v > full) v = full;
        img[r*L + c] = v;
      end
  endfunction

  function automatic void make_random(int L, int R, int bits, ref int img[]);
    img = new[L*R];
    foreach (img[i]) img[i] = $urandom % (1 << bits);
  endfunction

  // Test image: an arch-shaped block (a rectangle with a half-disc cut out of
  // its lower edge), bright on a dark background. Edges are anti-aliased
  // (2x2 supersampling); there is no noise.
  function automatic void make_arch(int L, int R, int bits, ref int img[]);
    int full = (1 << bits) - 1;
    int x0 = 2 * (L / 6), x1 = 2 * (L - L / 6), y0 = 2 * (R / 4), y1 = 2 * (R - R / 6);
    int cx = L, rad = (x1 - x0) / 4;
    int fg = full - full / 6, bg = full / 8;
    img = new[L*R];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < L; c++) begin
        int cov = 0;
        for (int s = 0; s < 4; s++) begin
          int y = 2 * r + s / 2, x = 2 * c + s % 2;
          bit in_blk = y >= y0 && y < y1 && x >= x0 && x < x1;
          bit in_cut = (y - y1) * (y - y1) + (x - cx) * (x - cx) < rad * rad;
          cov += (in_blk && !in_cut);
        end
        img[r*L + c] = bg + ((fg - bg) * cov) / 4;
      end
  endfunction

endpackage
