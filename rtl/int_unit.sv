// int_unit: ray / triangle intersection in unit-triangle space, one test per cycle.
//
// Each triangle is stored as the affine map that takes it to the unit triangle
// (0,0,0), (1,0,0), (0,1,0) in the z = 0 plane: p' = M p + c. The unit maps the ray,
// o' = M o + c and d' = M d (18 multiplies, 15 additions), then
//   t = -o'z / d'z,  u = o'x + t d'x,  v = o'y + t d'y,
// and the ray hits when t > 0, u >= 0, v >= 0 and u + v <= 1; (u, v) are the barycentric
// coordinates of the hit. Results (registered, valid/ready):
//  * do_list:  a hit, or the leaf's last triangle, reported to the list unit
//  * do_next:  not the last triangle: the leaf token advanced to the next list entry goes
//              back to the list arbiter
//  * do_shadow: a shadow ray that hits with t < 1 is occluded and returns to the shader
//              at once (neither do_list nor do_next)
// The transform, the single division, the hit/last-triangle reporting and the shadow-ray
// shortcut follow the report; its unit is deeply pipelined, this one computes in one stage.
module int_unit
  import rt_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  output logic               in_ready,
  input  leaf_tok_t          in_tok,
  input  logic [TRIID_W-1:0] in_tri,
  input  tri_mat_t           in_mat,
  input  ray_t               in_ray,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               do_list,
  output logic               do_next,
  output logic               do_shadow,
  output leaf_tok_t          next_tok,
  output logic [RAYID_W-1:0] res_id,
  output logic               res_hit,
  output logic               res_last,
  output logic [TRIID_W-1:0] res_tri,
  output fp24_t              res_t,
  output fp24_t              res_u,
  output fp24_t              res_v
);
  vec3_t ot, dt;
  fp24_t t, u, v;
  logic  hit, last, shadow_hit;

  always_comb begin
    ot.x = fp_add(dot3(in_mat.m0, in_ray.orig), in_mat.c.x);
    ot.y = fp_add(dot3(in_mat.m1, in_ray.orig), in_mat.c.y);
    ot.z = fp_add(dot3(in_mat.m2, in_ray.orig), in_mat.c.z);
    dt.x = dot3(in_mat.m0, in_ray.dir);
    dt.y = dot3(in_mat.m1, in_ray.dir);
    dt.z = dot3(in_mat.m2, in_ray.dir);
    t    = fp_div(fp_neg(ot.z), dt.z);
    u    = fp_add(ot.x, fp_mul(t, dt.x));
    v    = fp_add(ot.y, fp_mul(t, dt.y));
    hit  = !fp_is_inf(t) && fp_lt(FP_ZERO, t) && fp_le(FP_ZERO, u) && fp_le(FP_ZERO, v)
           && fp_le(fp_add(u, v), FP_ONE);
    last = (in_tok.left == 1);
    shadow_hit = in_tok.shadow && hit && fp_lt(t, FP_ONE);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      do_list   <= 1'b0;
      do_next   <= 1'b0;
      do_shadow <= 1'b0;
      next_tok  <= '0;
      res_id    <= '0;
      res_hit   <= 1'b0;
      res_last  <= 1'b0;
      res_tri   <= '0;
      res_t     <= '0;
      res_u     <= '0;
      res_v     <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        do_shadow     <= shadow_hit;
        do_list       <= !shadow_hit && (hit || last);
        do_next       <= !shadow_hit && !last;
        next_tok      <= in_tok;
        next_tok.lidx <= in_tok.lidx + 1'b1;
        next_tok.left <= in_tok.left - 1'b1;
        res_id        <= in_tok.id;
        res_hit       <= hit;
        res_last      <= last;
        res_tri       <= in_tri;
        res_t         <= t;
        res_u         <= u;
        res_v         <= v;
      end
    end
  end
endmodule
