// tb_scene_pkg: builds a small test scene for the ray pipe and full-system testbenches,
// and traces rays through it in real arithmetic as an independent reference.
//
// The scene is NTRI triangles placed pseudo-randomly (seeded) in front of a camera at
// (0,0,-10) looking down +Z. A k-d tree is built by splitting the box at its middle, axis by
// depth (X, Y, Z, ...), down to MAXD levels or at most one triangle per leaf; children
// without triangles are stored as empty leaves and flagged empty in the parent. Each
// triangle is stored as the affine map taking it to the unit triangle (inverse of the
// matrix [B-A, C-A, N], N = (B-A) x (C-A)). to_file() serialises everything in the scene
// loader's format.
package tb_scene_pkg;
  import tb_fp_pkg::*;

  localparam int NTRI = 12;
  localparam int MAXD = 7;

  typedef real vec_r [3];

  real   va [NTRI][3], vb [NTRI][3], vc [NTRI][3];
  real   smin [3], smax [3];
  logic [47:0] nodes [$];
  logic [15:0] lists [$];

  function automatic real rnd(ref int unsigned s, input real lo, input real hi);
    s = s * 1103515245 + 12345;
    return lo + (hi - lo) * real'((s >> 8) & 24'hFFFFFF) / 16777216.0;
  endfunction

  function automatic void make_triangles(int unsigned seed);
    int unsigned s;
    s = seed;
    for (int i = 0; i < NTRI; i++) begin
      real cx, cy, cz;
      cx = rnd(s, -7.0, 7.0); cy = rnd(s, -5.0, 5.0); cz = rnd(s, -2.0, 6.0);
      for (int k = 0; k < 3; k++) begin
        va[i][k] = (k == 0 ? cx : k == 1 ? cy : cz) + rnd(s, -3.0, 3.0);
        vb[i][k] = (k == 0 ? cx : k == 1 ? cy : cz) + rnd(s, -3.0, 3.0);
        vc[i][k] = (k == 0 ? cx : k == 1 ? cy : cz) + rnd(s, -3.0, 3.0);
      end
    end
    for (int k = 0; k < 3; k++) begin
      smin[k] = 1.0e9; smax[k] = -1.0e9;
      for (int i = 0; i < NTRI; i++) begin
        if (va[i][k] < smin[k]) smin[k] = va[i][k];
        if (vb[i][k] < smin[k]) smin[k] = vb[i][k];
        if (vc[i][k] < smin[k]) smin[k] = vc[i][k];
        if (va[i][k] > smax[k]) smax[k] = va[i][k];
        if (vb[i][k] > smax[k]) smax[k] = vb[i][k];
        if (vc[i][k] > smax[k]) smax[k] = vc[i][k];
      end
      smin[k] = smin[k] - 0.01;
      smax[k] = smax[k] + 0.01;
    end
  endfunction

  function automatic real tmin3(int i, int k);
    real m;
    m = va[i][k];
    if (vb[i][k] < m) m = vb[i][k];
    if (vc[i][k] < m) m = vc[i][k];
    return m;
  endfunction

  function automatic real tmax3(int i, int k);
    real m;
    m = va[i][k];
    if (vb[i][k] > m) m = vb[i][k];
    if (vc[i][k] > m) m = vc[i][k];
    return m;
  endfunction

  // Builds the subtree for the triangles in 'ids' inside box [lo, hi]; returns its node ID.
  function automatic int build(int ids[$], real lo[3], real hi[3], int depth);
    int me, axis;
    real mid;
    int l[$], r[$];
    real llo[3], lhi[3], rlo[3], rhi[3];
    int rid;
    me = nodes.size();
    if (ids.size() <= 1 || depth >= MAXD) begin
      nodes.push_back({2'b11, 6'(ids.size()), 16'(lists.size()), 24'd0});
      foreach (ids[j]) lists.push_back(16'(ids[j]));
      return me;
    end
    axis = depth % 3;
    mid  = (lo[axis] + hi[axis]) / 2.0;
    mid  = to_real(from_real(mid));   // the split must be representable
    foreach (ids[j]) begin
      if (tmin3(ids[j], axis) <= mid) l.push_back(ids[j]);
      if (tmax3(ids[j], axis) >= mid) r.push_back(ids[j]);
    end
    llo = lo; lhi = hi; rlo = lo; rhi = hi;
    lhi[axis] = mid;
    rlo[axis] = mid;
    nodes.push_back('0);
    void'(build(l, llo, lhi, depth + 1));
    rid = build(r, rlo, rhi, depth + 1);
    nodes[me] = {2'(axis), l.size() == 0, r.size() == 0, from_real(mid), 16'(rid), 4'd0};
    return me;
  endfunction

  function automatic void build_tree();
    int ids[$];
    nodes.delete();
    lists.delete();
    for (int i = 0; i < NTRI; i++) ids.push_back(i);
    void'(build(ids, smin, smax, 0));
  endfunction

  // unit-triangle transform of triangle i: 12 floats m00 m01 m02 m10 .. m22 c0 c1 c2
  function automatic void transform(int i, output real m[3][3], output real c[3]);
    real e1[3], e2[3], n[3], a[3][3], det;
    for (int k = 0; k < 3; k++) begin
      e1[k] = vb[i][k] - va[i][k];
      e2[k] = vc[i][k] - va[i][k];
    end
    n[0] = e1[1]*e2[2] - e1[2]*e2[1];
    n[1] = e1[2]*e2[0] - e1[0]*e2[2];
    n[2] = e1[0]*e2[1] - e1[1]*e2[0];
    for (int k = 0; k < 3; k++) begin
      a[k][0] = e1[k]; a[k][1] = e2[k]; a[k][2] = n[k];
    end
    det = a[0][0]*(a[1][1]*a[2][2]-a[1][2]*a[2][1]) - a[0][1]*(a[1][0]*a[2][2]-a[1][2]*a[2][0])
        + a[0][2]*(a[1][0]*a[2][1]-a[1][1]*a[2][0]);
    m[0][0] =  (a[1][1]*a[2][2]-a[1][2]*a[2][1]) / det;
    m[0][1] = -(a[0][1]*a[2][2]-a[0][2]*a[2][1]) / det;
    m[0][2] =  (a[0][1]*a[1][2]-a[0][2]*a[1][1]) / det;
    m[1][0] = -(a[1][0]*a[2][2]-a[1][2]*a[2][0]) / det;
    m[1][1] =  (a[0][0]*a[2][2]-a[0][2]*a[2][0]) / det;
    m[1][2] = -(a[0][0]*a[1][2]-a[0][2]*a[1][0]) / det;
    m[2][0] =  (a[1][0]*a[2][1]-a[1][1]*a[2][0]) / det;
    m[2][1] = -(a[0][0]*a[2][1]-a[0][1]*a[2][0]) / det;
    m[2][2] =  (a[0][0]*a[1][1]-a[0][1]*a[1][0]) / det;
    for (int r = 0; r < 3; r++)
      c[r] = -(m[r][0]*va[i][0] + m[r][1]*va[i][1] + m[r][2]*va[i][2]);
  endfunction

  function automatic logic [287:0] tri_word(int i);
    real m[3][3], c[3];
    logic [287:0] w;
    transform(i, m, c);
    w = {from_real(m[0][0]), from_real(m[0][1]), from_real(m[0][2]),
         from_real(m[1][0]), from_real(m[1][1]), from_real(m[1][2]),
         from_real(m[2][0]), from_real(m[2][1]), from_real(m[2][2]),
         from_real(c[0]), from_real(c[1]), from_real(c[2])};
    return w;
  endfunction

  function automatic logic [31:0] f32(real r);
    logic [63:0] b;
    int e;
    if (r == 0.0) return 32'd0;
    b = $realtobits(r);
    e = int'(b[62:52]) - 1023 + 127;
    return {b[63], e[7:0], b[51:29]};
  endfunction

  // Appends 'n' bytes of 'v', least significant first.
  function automatic void put(ref logic [7:0] f[$], input logic [287:0] v, input int n);
    for (int k = 0; k < n; k++) f.push_back(v[8*k +: 8]);
  endfunction

  function automatic void to_file(ref logic [7:0] f[$]);
    f.delete();
    put(f, 288'(nodes.size() * 6), 4);
    foreach (nodes[j]) put(f, 288'(nodes[j]), 6);
    put(f, 288'(lists.size() * 2), 4);
    foreach (lists[j]) put(f, 288'(lists[j]), 2);
    put(f, 288'(NTRI * 36), 4);
    for (int i = 0; i < NTRI; i++) put(f, tri_word(i), 36);
    put(f, 288'(NTRI * 20), 4);
    for (int i = 0; i < NTRI; i++)
      put(f, {from_real(0.5), from_real(0.25 * (i % 4)), from_real(1.0),
              from_real(0.0), from_real(0.0), from_real(-1.0), 16'(i)}, 20);
    put(f, 288'd24, 4);
    for (int k = 0; k < 3; k++) put(f, 288'(f32(smin[k])), 4);
    for (int k = 0; k < 3; k++) put(f, 288'(f32(smax[k])), 4);
  endfunction

  // Reference: closest triangle hit by o + t d, t > 0. Returns -1 for a miss. 'amb' is set
  // when the answer is numerically ambiguous (near an edge or two hits at almost equal t).
  function automatic int trace(real o[3], real d[3], output bit amb);
    int best;
    real bt;
    best = -1; bt = 1.0e30; amb = 0;
    for (int i = 0; i < NTRI; i++) begin
      real m[3][3], c[3], op[3], dp[3], t, u, v;
      transform(i, m, c);
      for (int r = 0; r < 3; r++) begin
        op[r] = m[r][0]*o[0] + m[r][1]*o[1] + m[r][2]*o[2] + c[r];
        dp[r] = m[r][0]*d[0] + m[r][1]*d[1] + m[r][2]*d[2];
      end
      if (dp[2] == 0.0) continue;
      t = -op[2] / dp[2];
      u = op[0] + t * dp[0];
      v = op[1] + t * dp[1];
      if (t > 0 && u > -2e-3 && v > -2e-3 && u + v < 1.0 + 2e-3) begin
        if (u < 2e-3 || v < 2e-3 || u + v > 1.0 - 2e-3) amb = 1;
        else begin
          if (best >= 0 && (t - bt < 1e-3 * bt) && (bt - t < 1e-3 * bt)) amb = 1;
          if (t < bt) begin bt = t; best = i; end
        end
      end
    end
    return best;
  endfunction

  function automatic logic [15:0] tri_color(int i);
    return 16'((32'(i) + 32'd1) * 32'h3A95);
  endfunction
endpackage
