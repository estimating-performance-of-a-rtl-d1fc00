// tb_scene: a random triangle scene and its B-KD tree for testbenches.
//
// 2**K triangles sit in a complete binary tree stored heap-style: node h
// (root h = 1) occupies words 2h (bounds) and 2h+1 (kind, axis, child or
// vertex references), so the children of h are at 4h and 4h+2. Node h
// splits along axis h % 3. Vertices follow the nodes, three words per
// triangle. The tree's child bounds are computed here on request, or left at
// zero for the update processor to fill in; up_program() returns the refit
// program that does so. ref_trace() finds a ray's closest hit by testing
// every triangle in real arithmetic.
// world_word() describes a small world made of two instances of the scene:
// at word address X an inner node (split on x) whose children, at X+2 and
// X+4, are transformation nodes into the scene's root, with matrix rows at
// X+8.. (instance A: object = world + (30,0,0); instance B: object =
// 2 world + (-40,0,0)). ref_world() is the matching reference tracer.
package tb_scene;
  import drpu_pkg::*;
  import tb_fp::*;

  int  K = 4;
  int  NTRI = 16;
  real V[$][3][3];          // [triangle][vertex][component]
  bit  with_bounds = 1'b1;
  int  prog_len = 0;
  word_t prog[$];

  function automatic int vbase();
    return 4 * NTRI;
  endfunction

  function automatic int prog_base();
    return vbase() + 3 * NTRI;
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  function automatic real q(input real x);
    return to_real(to_fp(x));
  endfunction

  function automatic void build(input int levels, input bit bounds);
    real c[3];
    K = levels;
    NTRI = 1 << levels;
    with_bounds = bounds;
    V.delete();
    for (int t = 0; t < NTRI; t++) begin
      for (int i = 0; i < 3; i++) c[i] = rnd(-10, 10);
      V.push_back('{default: 0.0});
      for (int k = 0; k < 3; k++)
        for (int i = 0; i < 3; i++) V[t][k][i] = q(c[i] + rnd(-3, 3));
    end
  endfunction

  // extent of the triangles under heap node g along axis a
  function automatic void extent(input int g, input int a, output real lo, output real hi);
    int l = g, h = g;
    while (l < NTRI) begin
      l = 2 * l;
      h = 2 * h + 1;
    end
    lo = 1.0e30;
    hi = -1.0e30;
    for (int t = l - NTRI; t <= h - NTRI; t++)
      for (int k = 0; k < 3; k++) begin
        if (V[t][k][a] < lo) lo = V[t][k][a];
        if (V[t][k][a] > hi) hi = V[t][k][a];
      end
  endfunction

  function automatic word_t node_word(input int h, input int which);
    word_t w = '0;
    real lo0, hi0, lo1, hi1;
    int t;
    if (h >= NTRI) begin
      t = h - NTRI;
      if (which == 1) begin
        w[1:0]    = 2'(NODE_LEAF);
        w[35:4]   = 32'(vbase() + 3 * t);
        w[67:36]  = 32'(vbase() + 3 * t + 1);
        w[99:68]  = 32'(vbase() + 3 * t + 2);
        w[127:100] = 28'(t);
      end
    end else if (which == 1) begin
      w[1:0]  = 2'(NODE_INNER);
      w[3:2]  = 2'(h % 3);
      w[35:4] = 32'(4 * h);
    end else if (with_bounds) begin
      extent(2 * h, h % 3, lo0, hi0);
      extent(2 * h + 1, h % 3, lo1, hi1);
      w = {to_fp(hi1), to_fp(lo1), to_fp(hi0), to_fp(lo0)};
    end
    return w;
  endfunction

  // number of words the scene (tree, vertices and program) occupies
  function automatic int words();
    return prog_base() + prog.size();
  endfunction

  function automatic word_t word(input int addr);
    int t, k;
    if (addr >= 2 && addr < vbase()) return node_word(addr / 2, addr % 2);
    if (addr >= vbase() && addr < prog_base()) begin
      t = (addr - vbase()) / 3;
      k = (addr - vbase()) % 3;
      return {32'd0, to_fp(V[t][k][2]), to_fp(V[t][k][1]), to_fp(V[t][k][0])};
    end
    if (addr >= prog_base() && addr < prog_base() + prog.size()) return prog[addr - prog_base()];
    return '0;
  endfunction

  function automatic word_t up_instr(input int op, input int dst, input int a, input int b,
                                     input int c, input int axis, input int addr);
    word_t w = '0;
    w[3:0] = 4'(op); w[9:4] = 6'(dst); w[15:10] = 6'(a); w[21:16] = 6'(b);
    w[27:22] = 6'(c); w[29:28] = 2'(axis); w[63:32] = 32'(addr);
    return w;
  endfunction

  // Refit program: bound every leaf triangle into bound register h, then
  // merge bottom-up and store each inner node's child extents. Needs
  // 2**(K+1) <= 64 bound registers.
  function automatic void make_up_program();
    int vr;
    prog.delete();
    for (int t = 0; t < NTRI; t++) begin
      vr = 3 * (t % 21);
      for (int k = 0; k < 3; k++) prog.push_back(up_instr(1, vr + k, 0, 0, 0, 0, vbase() + 3 * t + k));
      prog.push_back(up_instr(2, NTRI + t, vr, vr + 1, vr + 2, 0, 0));
    end
    for (int h = NTRI - 1; h >= 1; h--) begin
      prog.push_back(up_instr(3, h, 2 * h, 2 * h + 1, 0, 0, 0));
      prog.push_back(up_instr(4, 0, 2 * h, 2 * h + 1, 0, h % 3, 2 * h));
    end
    prog.push_back(up_instr(0, 0, 0, 0, 0, 0, 0));
  endfunction

  // Closest hit by brute force. ambiguous is set when a decision lies within
  // rounding distance of a triangle edge or two hits are nearly equal.
  function automatic void ref_trace(input real o[3], input real d[3], input real tfar,
                                    output bit hit, output int prim, output real tbest,
                                    output bit ambiguous);
    real e1[3], e2[3], s[3], p[3], qv[3], det, u, v, t, t2;
    hit = 0; prim = -1; tbest = 1.0e30; ambiguous = 0; t2 = 1.0e30;
    for (int n = 0; n < NTRI; n++) begin
      for (int c = 0; c < 3; c++) begin
        e1[c] = V[n][1][c] - V[n][0][c]; e2[c] = V[n][2][c] - V[n][0][c]; s[c] = o[c] - V[n][0][c];
      end
      p[0] = d[1]*e2[2] - d[2]*e2[1]; p[1] = d[2]*e2[0] - d[0]*e2[2]; p[2] = d[0]*e2[1] - d[1]*e2[0];
      qv[0] = s[1]*e1[2] - s[2]*e1[1]; qv[1] = s[2]*e1[0] - s[0]*e1[2]; qv[2] = s[0]*e1[1] - s[1]*e1[0];
      det = e1[0]*p[0] + e1[1]*p[1] + e1[2]*p[2];
      if (det < 1e-6 && det > -1e-6) continue;
      u = (s[0]*p[0] + s[1]*p[1] + s[2]*p[2]) / det;
      v = (d[0]*qv[0] + d[1]*qv[1] + d[2]*qv[2]) / det;
      t = (e2[0]*qv[0] + e2[1]*qv[1] + e2[2]*qv[2]) / det;
      if ((u > -1e-3 && u < 1e-3) || (v > -1e-3 && v < 1e-3) || (u + v > 1 - 1e-3 && u + v < 1 + 1e-3)
          || (t > -1e-3 && t < 1e-3) || (t > tfar * (1 - 1e-3) && t < tfar * (1 + 1e-3)))
        if (u > -0.01 && v > -0.01 && u + v < 1.01) ambiguous = 1;
      if (u >= 0 && v >= 0 && u + v <= 1 && t > 0 && t < tfar) begin
        if (t < tbest) begin
          t2 = tbest; tbest = t; prim = n; hit = 1;
        end else if (t < t2) t2 = t;
      end
    end
    if (hit && t2 < tbest * (1 + 1e-3)) ambiguous = 1;
  endfunction

  function automatic word_t world_word(input int X, input int addr);
    word_t w;
    real lo, hi;
    w = '0;
    if (addr == X) begin
      extent(1, 0, lo, hi);
      w = {to_fp((hi + 40.0) / 2.0 + 0.05), to_fp((lo + 40.0) / 2.0 - 0.05),
           to_fp(hi - 30.0 + 0.05), to_fp(lo - 30.0 - 0.05)};
    end else if (addr == X + 1) begin
      w[1:0] = 2'(NODE_INNER); w[35:4] = 32'(X + 2);
    end else if (addr == X + 3 || addr == X + 5) begin
      w[1:0] = 2'(NODE_TRANSFORM); w[35:4] = 32'd2; w[67:36] = 32'(X + 8 + 3 * ((addr - X - 3) / 2));
    end else if (addr == X + 8)  w = {to_fp(30.0), FP_ZERO, FP_ZERO, FP_ONE};
    else if (addr == X + 9)  w = {FP_ZERO, FP_ZERO, FP_ONE, FP_ZERO};
    else if (addr == X + 10) w = {FP_ZERO, FP_ONE, FP_ZERO, FP_ZERO};
    else if (addr == X + 11) w = {to_fp(-40.0), FP_ZERO, FP_ZERO, to_fp(2.0)};
    else if (addr == X + 12) w = {FP_ZERO, FP_ZERO, to_fp(2.0), FP_ZERO};
    else if (addr == X + 13) w = {FP_ZERO, to_fp(2.0), FP_ZERO, FP_ZERO};
    return w;
  endfunction

  function automatic void ref_world(input real o[3], input real d[3], input real tfar,
                                    output bit hit, output int prim, output bit amb);
    real oa[3], da[3], ob[3], db[3], ta, tb;
    bit  ha, hb, aa, ab;
    int  pa, pb;
    for (int c = 0; c < 3; c++) begin
      oa[c] = o[c] + ((c == 0) ? 30.0 : 0.0);  da[c] = d[c];
      ob[c] = 2.0 * o[c] - ((c == 0) ? 40.0 : 0.0);  db[c] = 2.0 * d[c];
    end
    ref_trace(oa, da, tfar, ha, pa, ta, aa);
    ref_trace(ob, db, tfar, hb, pb, tb, ab);
    amb = aa || ab;
    hit = ha || hb;
    prim = (ha && (!hb || ta < tb)) ? pa : pb;
    if (ha && hb && (ta < tb * 1.001) && (tb < ta * 1.001)) amb = 1;
  endfunction
endpackage
