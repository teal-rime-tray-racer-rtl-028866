// scene_int: intersects each new ray with the scene's axis-aligned bounding box.
//
// Slab test: for each axis, t1 = (min - o)/d and t2 = (max - o)/d (as products with 1/d);
// tmin is the largest of the near values and 0, tmax the smallest of the far values (and at
// most 1.0 for a shadow ray, whose direction spans the segment to the light). The ray misses
// when tmax < tmin. The result leaves as a ray token for the k-d tree root (node 0) with the
// restart-search bit set, plus out_miss; the ray pipe sends misses back to the shader and
// hits to the traversal arbiter and the short stack. Registered output with valid/ready,
// one ray per cycle. The report gives the unit's inputs, outputs and routing; the slab
// formulation is the standard one and is this design's choice of insides.
module scene_int
  import rt_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  vec3_t              bbox_min,
  input  vec3_t              bbox_max,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [RAYID_W-1:0] in_id,
  input  logic               in_shadow,
  input  ray_t               in_ray,
  output logic               out_valid,
  input  logic               out_ready,
  output ray_tok_t           out_tok,
  output logic               out_miss
);
  fp24_t near_t [3], far_t [3];
  fp24_t tmin, tmax;

  always_comb begin
    for (int a = 0; a < 3; a++) begin
      fp24_t inv, t1, t2;
      inv = fp_div(FP_ONE, vec_comp(in_ray.dir, 2'(a)));
      t1  = fp_mul(fp_sub(vec_comp(bbox_min, 2'(a)), vec_comp(in_ray.orig, 2'(a))), inv);
      t2  = fp_mul(fp_sub(vec_comp(bbox_max, 2'(a)), vec_comp(in_ray.orig, 2'(a))), inv);
      near_t[a] = fp_min(t1, t2);
      far_t[a]  = fp_max(t1, t2);
    end
    tmin = fp_max(FP_ZERO, fp_max(near_t[0], fp_max(near_t[1], near_t[2])));
    tmax = fp_min(far_t[0], fp_min(far_t[1], far_t[2]));
    if (in_shadow) tmax = fp_min(tmax, FP_ONE);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_tok   <= '0;
      out_miss  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tok.id             <= in_id;
        out_tok.shadow         <= in_shadow;
        out_tok.restart_search <= 1'b1;
        out_tok.node           <= '0;
        out_tok.tmin           <= tmin;
        out_tok.tmax           <= tmax;
        out_miss               <= fp_lt(tmax, tmin);
      end
    end
  end
endmodule
