// drpu_pkg: types, constants and single-precision arithmetic shared by the
// ray-casting units of the DRPU (Dynamic Ray Processing Unit).
//
// Floating point: IEEE-754 binary32 bit layout. The arithmetic functions are
// a simplified subset chosen for this design: results are truncated (round
// toward zero), denormal inputs and results are flushed to zero, overflow
// gives infinity, and NaN is not produced or propagated specially. The
// comparison helpers order values by their sign-magnitude bit pattern.
//
// Memory words are 128 bits (the width of the first-level caches). The
// B-KD tree node layout is this design's own (the source only says that a
// node holds an axis, two bounding intervals and a child reference, and a
// leaf a reference to one primitive):
//   node word 0 (address A):   {c1_hi, c1_lo, c0_hi, c0_lo}  four floats
//   node word 1 (address A+1): [1:0] kind, [3:2] axis,
//      inner: [35:4] address of child 0; child 1 is at child 0 + 2
//      leaf:  [35:4] v0 address, [67:36] v1 address, [99:68] v2 address,
//             [127:100] primitive id
// A vertex is one word {unused, z, y, x}.
package drpu_pkg;

  localparam int unsigned WORD_W = 128;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned RAYS   = 4;   // rays (threads) per packet

  typedef logic [31:0]        fp32_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WORD_W-1:0]  word_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;
  localparam fp32_t FP_NINF = 32'hFF80_0000;

  typedef struct packed {
    fp32_t z;
    fp32_t y;
    fp32_t x;
  } vec3_t;

  typedef struct packed {
    vec3_t dir;
    vec3_t org;
  } ray_t;

  // Memory port, request side: held until the responder raises ready.
  typedef struct packed {
    logic  valid;
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // Memory port, response side: one read response per accepted read.
  typedef struct packed {
    logic  valid;
    word_t rdata;
  } mem_rsp_t;

  typedef enum logic [1:0] {
    NODE_INNER     = 2'd0,
    NODE_LEAF      = 2'd1,
    NODE_TRANSFORM = 2'd2
  } node_kind_e;

  // Per-ray traversal interval.
  typedef struct packed {
    fp32_t lo;
    fp32_t hi;
  } ival_t;

  // Result of one ray's triangle test.
  typedef struct packed {
    logic  hit;
    fp32_t t;
    fp32_t u;
    fp32_t v;
  } hit_t;

  typedef logic [27:0] prim_t;

  // Work handed from the traversal processor to the geometry unit.
  // mode 0: intersect every ray with the triangle whose vertices are at
  //         vaddr[0..2], accepting only hits with 0 < t < tmax.
  // mode 1: transform every ray by the 3x4 matrix whose rows are the words
  //         at vaddr[0..2] ({m3, m2, m1, m0} per row).
  typedef struct packed {
    logic                 mode;
    logic [RAYS-1:0]      mask;
    ray_t [RAYS-1:0]      rays;
    fp32_t [RAYS-1:0]     tmax;
    addr_t [2:0]          vaddr;
  } gu_req_t;

  typedef struct packed {
    hit_t [RAYS-1:0] hits;
    ray_t [RAYS-1:0] rays;   // transformed rays in mode 1
  } gu_rsp_t;

  localparam int unsigned PKT_W = 5;   // packet id width (32 packets)

  // "trace" request from the shader processor to the traversal processor.
  typedef struct packed {
    logic [PKT_W-1:0]     pkt;
    addr_t                root;   // address of the B-KD tree root node
    logic [RAYS-1:0]      mask;   // rays taking part
    ray_t [RAYS-1:0]      rays;
    fp32_t [RAYS-1:0]     tfar;   // end of each ray's traversal interval
  } trace_req_t;

  // Result returned to the shader processor's return registers.
  typedef struct packed {
    logic [PKT_W-1:0]     pkt;
    hit_t [RAYS-1:0]      hits;
    prim_t [RAYS-1:0]     prim;
  } trace_rsp_t;

  // ------------------------------------------------------------------
  // Floating point helpers
  // ------------------------------------------------------------------

  function automatic logic [31:0] fp_key(input fp32_t a);
    return a[31] ? ~a : (a | 32'h8000_0000);
  endfunction

  function automatic logic fp_lt(input fp32_t a, input fp32_t b);
    return fp_key(a) < fp_key(b);
  endfunction

  function automatic logic fp_le(input fp32_t a, input fp32_t b);
    return fp_key(a) <= fp_key(b);
  endfunction

  function automatic fp32_t fp_min(input fp32_t a, input fp32_t b);
    return fp_lt(b, a) ? b : a;
  endfunction

  function automatic fp32_t fp_max(input fp32_t a, input fp32_t b);
    return fp_lt(a, b) ? b : a;
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    logic [9:0]  e;
    logic [22:0] m;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    if (p[47]) begin
      m = p[46:24];
      e = 10'(a[30:23]) + 10'(b[30:23]) - 10'd126;
    end else begin
      m = p[45:23];
      e = 10'(a[30:23]) + 10'(b[30:23]) - 10'd127;
    end
    // e is unsigned 10 bit: values >= 512 encode an underflow below zero
    if (e[9] || e == 10'd0) return {s, 31'd0};
    if (e >= 10'd255) return {s, 8'hFF, 23'd0};
    return {s, e[7:0], m};
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       big, sml;
    logic [7:0]  d;
    logic [49:0] mb, ms, r;
    logic [9:0]  e;
    int          lz;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? FP_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else begin big = b; sml = a; end
    d  = big[30:23] - sml[30:23];
    mb = {2'b00, 1'b1, big[22:0], 24'd0};
    ms = {2'b00, 1'b1, sml[22:0], 24'd0};
    ms = (d >= 8'd48) ? 50'd0 : (ms >> d);
    e  = 10'(big[30:23]);
    if (big[31] == sml[31]) begin
      r = mb + ms;
      if (r[48]) begin
        r = r >> 1;
        e = e + 10'd1;
      end
    end else begin
      r = mb - ms;
      if (r == 50'd0) return FP_ZERO;
      lz = 0;
      for (int i = 47; i >= 0; i--) begin
        if (r[i] == 1'b1 && lz == 0) lz = 47 - i + 1;
      end
      lz = lz - 1;
      r  = r << lz;
      e  = e - 10'(lz);
    end
    if (e[9] || e == 10'd0) return FP_ZERO;
    if (e >= 10'd255) return {big[31], 8'hFF, 23'd0};
    return {big[31], e[7:0], r[46:24]};
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic        s;
    logic [48:0] q;
    logic [9:0]  e;
    logic [22:0] m;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {s, 8'hFF, 23'd0};
    if (a[30:23] == 8'd0) return {s, 31'd0};
    if (b[30:23] == 8'hFF) return {s, 31'd0};
    if (a[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    q = {1'b1, a[22:0], 25'd0} / 49'({1'b1, b[22:0]});
    if (q[25]) begin
      m = q[24:2];
      e = 10'(a[30:23]) - 10'(b[30:23]) + 10'd127;
    end else begin
      m = q[23:1];
      e = 10'(a[30:23]) - 10'(b[30:23]) + 10'd126;
    end
    if (e[9] || e == 10'd0) return {s, 31'd0};
    if (e >= 10'd255) return {s, 8'hFF, 23'd0};
    return {s, e[7:0], m};
  endfunction

  function automatic vec3_t v_sub(input vec3_t a, input vec3_t b);
    return '{z: fp_sub(a.z, b.z), y: fp_sub(a.y, b.y), x: fp_sub(a.x, b.x)};
  endfunction

  function automatic fp32_t v_dot(input vec3_t a, input vec3_t b);
    return fp_add(fp_add(fp_mul(a.x, b.x), fp_mul(a.y, b.y)), fp_mul(a.z, b.z));
  endfunction

  function automatic vec3_t v_cross(input vec3_t a, input vec3_t b);
    return '{x: fp_sub(fp_mul(a.y, b.z), fp_mul(a.z, b.y)),
             y: fp_sub(fp_mul(a.z, b.x), fp_mul(a.x, b.z)),
             z: fp_sub(fp_mul(a.x, b.y), fp_mul(a.y, b.x))};
  endfunction

  function automatic fp32_t v_comp(input vec3_t a, input logic [1:0] axis);
    case (axis)
      2'd0:    return a.x;
      2'd1:    return a.y;
      default: return a.z;
    endcase
  endfunction

endpackage
