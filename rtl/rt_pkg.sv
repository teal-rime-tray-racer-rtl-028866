// rt_pkg: types, constants and float arithmetic shared by the ray tracer.
//
// Numbers in the scene and the ray pipe use a 24-bit float: 1 sign bit, 8 exponent bits
// (bias 127) and 15 mantissa bits, i.e. the upper 24 bits of an IEEE single. The format
// follows the report's scene file (1/8/15 split); the arithmetic below is this design's
// own: denormals flush to zero, results are truncated, x/0 gives a signed infinity and
// exponent overflow saturates to infinity. All functions are combinational; the units that
// use them register their results.
//
// k-d tree node (48 bits), as stored by the scene loader:
//   interior: [47:46] axis (0=X,1=Y,2=Z) [45] left child empty [44] right child empty
//             [43:20] split plane (fp24) [19:4] right child node ID [3:0] unused
//             The left child is node ID + 1.
//   leaf:     [47:46] = 2'b11 [45:40] number of triangles (0..63) [39:24] list index
package rt_pkg;

  typedef logic [23:0] fp24_t;

  localparam int RAYID_W  = 9;    // 512 ray IDs
  localparam int NODEID_W = 16;
  localparam int LIDX_W   = 16;   // index into the triangle-ID lists
  localparam int TRIID_W  = 16;
  localparam int NODE_W   = 48;
  localparam int PIX_W    = 19;   // 640*480 pixels
  localparam int NTRI_W   = 6;    // up to 63 triangles per leaf

  localparam fp24_t FP_ZERO = 24'h000000;
  localparam fp24_t FP_ONE  = 24'h3F8000;
  localparam fp24_t FP_TWO  = 24'h400000;
  localparam fp24_t FP_INF  = 24'h7F8000;
  localparam fp24_t FP_RSQRT2 = 24'h3F3504;  // 0.70710

  typedef struct packed {
    fp24_t x;
    fp24_t y;
    fp24_t z;
  } vec3_t;

  typedef struct packed {
    vec3_t orig;
    vec3_t dir;
  } ray_t;

  // Token that circulates through the traversal / intersection loops.
  typedef struct packed {
    logic [RAYID_W-1:0]  id;
    logic                shadow;
    logic                restart_search;
    logic [NODEID_W-1:0] node;
    fp24_t               tmin;
    fp24_t               tmax;
  } ray_tok_t;

  // Leaf work item for the list path.
  typedef struct packed {
    logic [RAYID_W-1:0] id;
    logic               shadow;
    logic [LIDX_W-1:0]  lidx;    // list index of the next triangle
    logic [NTRI_W-1:0]  left;    // triangles still to intersect, including this one
  } leaf_tok_t;

  // Final result of a ray returned to the shader.
  typedef struct packed {
    logic [RAYID_W-1:0] id;
    logic               hit;
    logic               shadow;
    logic [TRIID_W-1:0] tri_id;
    fp24_t              t;
    fp24_t              u;
    fp24_t              v;
    vec3_t              point;
  } ray_result_t;

  // Unit-triangle transform: p' = M p + c (rows of M, then c).
  typedef struct packed {
    vec3_t m0;
    vec3_t m1;
    vec3_t m2;
    vec3_t c;
  } tri_mat_t;

  typedef struct packed {
    logic [1:0]          axis;
    logic                lempty;
    logic                rempty;
    fp24_t               split;
    logic [NODEID_W-1:0] right;
    logic [3:0]          pad;
  } kd_inner_t;

  typedef struct packed {
    logic [1:0]         tag;
    logic [NTRI_W-1:0]  ntri;
    logic [LIDX_W-1:0]  lidx;
    logic [23:0]        pad;
  } kd_leaf_t;

  function automatic logic fp_is_zero(fp24_t a);
    return a[22:15] == 8'd0;
  endfunction

  function automatic logic fp_is_inf(fp24_t a);
    return a[22:15] == 8'hFF;
  endfunction

  function automatic fp24_t fp_neg(fp24_t a);
    return {~a[23], a[22:0]};
  endfunction

  function automatic fp24_t fp_abs(fp24_t a);
    return {1'b0, a[22:0]};
  endfunction

  // Bitwise select. The arithmetic below picks between special and normal results with
  // this instead of if/return, so every multiplier and shifter is always in use and
  // synthesis has no exclusive branches to try to share them across.
  function automatic fp24_t fp_sel(logic c, fp24_t a, fp24_t b);
    return (a & {24{c}}) | (b & {24{~c}});
  endfunction

  function automatic fp24_t fp_mul(fp24_t a, fp24_t b);
    logic        s, zero, inf;
    logic [31:0] m;
    logic [9:0]  e;
    fp24_t       norm;
    s    = a[23] ^ b[23];
    zero = fp_is_zero(a) || fp_is_zero(b);
    inf  = fp_is_inf(a) || fp_is_inf(b);
    m = {16'd0, 1'b1, a[14:0]} * {16'd0, 1'b1, b[14:0]};
    e = {2'b00, a[22:15]} + {2'b00, b[22:15]} + {9'd0, m[31]} - 10'd127;
    if (m[31]) m = m >> 1;
    norm = {s, e[7:0], m[29:15]};
    if (e[9] || e == 0) norm = {s, 23'd0};            // underflow
    else if (e >= 10'd255) norm = {s, 8'hFF, 15'd0};  // overflow
    return fp_sel(zero, {s, 23'd0}, fp_sel(inf, {s, 8'hFF, 15'd0}, norm));
  endfunction

  function automatic fp24_t fp_add(fp24_t a, fp24_t b);
    fp24_t       hi_op, lo_op, norm;
    logic [19:0] ma, mb, sum;
    logic [7:0]  sh;
    logic [9:0]  e;
    if (a[22:0] >= b[22:0]) begin
      hi_op = a; lo_op = b;
    end else begin
      hi_op = b; lo_op = a;
    end
    sh = hi_op[22:15] - lo_op[22:15];
    ma = {1'b0, 1'b1, hi_op[14:0], 3'b000};
    mb = ({1'b0, 1'b1, lo_op[14:0], 3'b000} >> sh) & {20{sh < 8'd20}};
    e  = {2'b00, hi_op[22:15]};
    if (hi_op[23] == lo_op[23]) begin
      sum = ma + mb;
      if (sum[19]) begin
        sum = sum >> 1;
        e = e + 1'b1;
      end
    end else begin
      sum = ma - mb;
      for (int i = 0; i < 19; i++) begin
        if (!sum[18]) begin
          sum = sum << 1;
          e = e - 1'b1;
        end
      end
    end
    norm = {hi_op[23], e[7:0], sum[17:3]};
    if (sum == 20'd0 || e[9] || e == 0) norm = FP_ZERO;
    else if (e >= 10'd255) norm = {hi_op[23], 8'hFF, 15'd0};
    return fp_sel(fp_is_zero(b), a, fp_sel(fp_is_zero(a), b,
           fp_sel(fp_is_inf(a), a, fp_sel(fp_is_inf(b), b, norm))));
  endfunction

  function automatic fp24_t fp_sub(fp24_t a, fp24_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp24_t fp_div(fp24_t a, fp24_t b);
    logic        s;
    logic [32:0] q;
    logic [9:0]  e;
    fp24_t       norm;
    s = a[23] ^ b[23];
    q = {1'b1, a[14:0], 17'd0} / {17'd0, 1'b1, b[14:0]};
    e = {2'b00, a[22:15]} - {2'b00, b[22:15]} + 10'd127 - {9'd0, !q[17]};
    if (!q[17]) q = q << 1;
    norm = {s, e[7:0], q[16:2]};
    if (e[9] || e == 0) norm = {s, 23'd0};
    else if (e >= 10'd255) norm = {s, 8'hFF, 15'd0};
    return fp_sel(fp_is_zero(b) || fp_is_inf(a), {s, 8'hFF, 15'd0},
                  fp_sel(fp_is_zero(a) || fp_is_inf(b), {s, 23'd0}, norm));
  endfunction

  // Ordering key: a plain unsigned compare of keys orders the floats (-0 taken as +0).
  function automatic logic [23:0] fp_key(fp24_t a);
    if (fp_is_zero(a)) return 24'h800000;
    return a[23] ? ~a : {1'b1, a[22:0]};
  endfunction

  function automatic logic fp_lt(fp24_t a, fp24_t b);
    return fp_key(a) < fp_key(b);
  endfunction

  function automatic logic fp_le(fp24_t a, fp24_t b);
    return fp_key(a) <= fp_key(b);
  endfunction

  function automatic fp24_t fp_min(fp24_t a, fp24_t b);
    return fp_lt(a, b) ? a : b;
  endfunction

  function automatic fp24_t fp_max(fp24_t a, fp24_t b);
    return fp_lt(a, b) ? b : a;
  endfunction

  // Signed integer to float (truncating).
  function automatic fp24_t fp_from_int(logic signed [31:0] v);
    logic        s;
    logic [31:0] m;
    int          e;
    if (v == 0) return FP_ZERO;
    s = v[31];
    m = s ? 32'(-v) : 32'(v);
    e = 127 + 31;
    for (int i = 0; i < 32; i++) begin
      if (!m[31]) begin
        m = m << 1;
        e = e - 1;
      end
    end
    return {s, e[7:0], m[30:16]};
  endfunction

  // Float to unsigned integer, truncating; negative gives 0, saturates at 2^16-1.
  function automatic logic [15:0] fp_to_uint16(fp24_t a);
    logic [7:0]  e;
    logic [31:0] m;
    e = a[22:15] - 8'd127;
    m = ({16'd0, 1'b1, a[14:0]} >> (8'd15 - e)) & {32{e < 8'd16}};
    if (a[23] || a[22:15] < 8'd127) return 16'd0;
    if (a[22:15] > 8'd142) return 16'hFFFF;
    return m[15:0];
  endfunction

  function automatic fp24_t vec_comp(vec3_t v, logic [1:0] axis);
    case (axis)
      2'd0:    return v.x;
      2'd1:    return v.y;
      default: return v.z;
    endcase
  endfunction

  function automatic fp24_t dot3(vec3_t a, vec3_t b);
    return fp_add(fp_add(fp_mul(a.x, b.x), fp_mul(a.y, b.y)), fp_mul(a.z, b.z));
  endfunction

  function automatic vec3_t vadd(vec3_t a, vec3_t b);
    return '{x: fp_add(a.x, b.x), y: fp_add(a.y, b.y), z: fp_add(a.z, b.z)};
  endfunction

  function automatic vec3_t vsub(vec3_t a, vec3_t b);
    return '{x: fp_sub(a.x, b.x), y: fp_sub(a.y, b.y), z: fp_sub(a.z, b.z)};
  endfunction

  function automatic vec3_t vscale(vec3_t a, fp24_t k);
    return '{x: fp_mul(a.x, k), y: fp_mul(a.y, k), z: fp_mul(a.z, k)};
  endfunction

endpackage
