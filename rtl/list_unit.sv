// list_unit: keeps each ray's closest triangle hit within the current leaf and decides what
// the ray does when the leaf's last triangle has been tested.
//
// Per ray ID it stores the leaf's tmax, a hit flag and the closest hit so far (t, triangle
// ID, barycentric u and v). The traversal unit initialises a ray's entry when the ray enters
// a leaf (init_*; always accepted). The intersection unit reports hits and the last
// triangle (res_*): a hit is kept when it is the first or closer than the stored one. On the
// last triangle, if there is a hit no farther than the leaf's tmax the ray is finished: the
// hit point o + t d is computed (ray vectors from a raystore copy) and the result leaves for
// the shader (out_hit = 1). Otherwise the ray missed everything in this leaf and leaves as a
// pop request for the short stack with pop_t = leaf tmax (out_hit = 0). One registered
// result, valid/ready; res_ready drops while it is full. The per-ray storage, the
// comparisons and both exits follow the report, including the small hit-point step; the
// single-cycle structure is this design's.
module list_unit
  import rt_pkg::*;
#(
  parameter int NUM_RAYS = 512
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_valid,
  input  logic [RAYID_W-1:0] init_id,
  input  fp24_t              init_tmax,
  input  logic               res_valid,
  output logic               res_ready,
  input  logic [RAYID_W-1:0] res_id,
  input  logic               res_hit,
  input  logic               res_last,
  input  logic [TRIID_W-1:0] res_tri,
  input  fp24_t              res_t,
  input  fp24_t              res_u,
  input  fp24_t              res_v,
  output logic [RAYID_W-1:0] rs_addr,
  input  ray_t               rs_ray,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_hit,
  output ray_result_t        out_result,
  output fp24_t              out_pop_t
);
  typedef struct packed {
    logic               hit;
    logic [TRIID_W-1:0] tri_id;
    fp24_t              t;
    fp24_t              u;
    fp24_t              v;
  } best_t;

  fp24_t leaf_tmax [NUM_RAYS];
  best_t best_mem  [NUM_RAYS];

  best_t cur, nxt;
  logic  take;

  assign res_ready = !out_valid || out_ready;
  assign take      = res_valid && res_ready;
  assign rs_addr   = res_id;

  always_comb begin
    cur = best_mem[res_id];
    nxt = cur;
    if (res_hit && (!cur.hit || fp_lt(res_t, cur.t)))
      nxt = '{hit: 1'b1, tri_id: res_tri, t: res_t, u: res_u, v: res_v};
  end

  always_ff @(posedge clk) begin
    if (take) best_mem[res_id] <= nxt;
    if (init_valid) begin
      leaf_tmax[init_id]    <= init_tmax;
      best_mem[init_id].hit <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_hit    <= 1'b0;
      out_result <= '0;
      out_pop_t  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take && res_last) begin
        out_valid         <= 1'b1;
        out_hit           <= nxt.hit && fp_le(nxt.t, leaf_tmax[res_id]);
        out_pop_t         <= leaf_tmax[res_id];
        out_result.id     <= res_id;
        out_result.hit    <= 1'b1;
        out_result.shadow <= 1'b0;
        out_result.tri_id <= nxt.tri_id;
        out_result.t      <= nxt.t;
        out_result.u      <= nxt.u;
        out_result.v      <= nxt.v;
        out_result.point  <= vadd(rs_ray.orig, vscale(rs_ray.dir, nxt.t));
      end
    end
  end

  a_init_not_with_result: assert property (@(posedge clk) disable iff (rst)
    (init_valid && take) |-> init_id != res_id);
endmodule
