// raypipe: the ray tracing pipeline, from primary ray generation to finished pixels.
//
// Data flow (each arrow a valid/ready stream):
//   prg -> shader -> scene_int --miss--> shader
//                       |hit: root token + short stack init
//                       v
//   tarb (traversal arbiter: loop-back, short stack, new rays) -> tcache lookup -> trav_unit
//   trav_unit --next child--> loop FIFO -> tarb
//             --push/restart--> shortstack
//             --empty node---> shortstack pop
//             --leaf---------> list_unit init + leaf FIFO -> larb
//   larb (list arbiter: next triangle, new leaves) -> lcache (triangle ID) -> icache
//        (transform) + raystore (ray) -> int_unit
//   int_unit --hit / last triangle--> list_unit ; --more triangles--> loop FIFO -> larb ;
//            --occluded shadow ray--> shader
//   list_unit --closest hit in leaf--> shader ; --no hit--> shortstack pop
//   shortstack --popped node / restart--> FIFO -> tarb ; --left the scene--> shader
// Every ray is one token. The shader hands out at most NUM_RAYS ray IDs, so at most NUM_RAYS
// tokens exist; the FIFOs that close the loops are NUM_RAYS deep and therefore never refuse a
// token, which keeps the loops free of deadlock. Each unit computes in one registered stage.
// The units, the loops and the arbiters follow the report's ray pipe; the loop FIFOs, their
// depth and the single-stage units are this design's choices.
// ev_* are one-cycle event pulses for monitoring.
module raypipe
  import rt_pkg::*;
#(
  parameter int NUM_RAYS   = 512,
  parameter int NODE_DEPTH = 2048,
  parameter int LIST_DEPTH = 4096,
  parameter int TRI_DEPTH  = 2048,
  parameter int SS_DEPTH   = 4
) (
  input  logic         clk,
  input  logic         rst,
  // frame control and camera
  input  logic         start,
  input  logic [2:0]   res_level,
  input  vec3_t        cam_e,
  input  vec3_t        cam_u,
  input  vec3_t        cam_v,
  input  vec3_t        cam_w,
  output logic [2:0]   level,
  output logic         prg_active,
  // scene
  input  vec3_t        bbox_min,
  input  vec3_t        bbox_max,
  input  logic         tc_we,
  input  logic         lc_we,
  input  logic         ic_we,
  input  logic [15:0]  wr_addr,
  input  logic [287:0] wr_data,
  // finished pixels
  output logic         pix_valid,
  input  logic         pix_ready,
  output logic [18:0]  pix_addr,
  output logic [15:0]  pix_color,
  // events
  output logic         ev_scene_miss,
  output logic         ev_push,
  output logic         ev_pop,
  output logic         ev_restart,
  output logic         ev_exit_miss,
  output logic         ev_leaf,
  output logic         ev_tri_test,
  output logic         ev_hit,
  output logic         ev_stall
);
  localparam int NAW = $clog2(NODE_DEPTH);
  localparam int LAW = $clog2(LIST_DEPTH);
  localparam int TAW = $clog2(TRI_DEPTH);

  // ---------------- primary rays and shader ----------------
  logic        p_valid, p_ready;
  ray_t        p_ray;
  logic [18:0] p_pix;
  logic        p_done;

  prg u_prg (
    .clk, .rst, .start, .res_level, .cam_e, .cam_u, .cam_v, .cam_w,
    .out_valid(p_valid), .out_ready(p_ready), .out_ray(p_ray), .out_pix(p_pix),
    .active(prg_active), .level, .done(p_done));

  logic               rs_we;
  logic [RAYID_W-1:0] rs_id;
  ray_t               rs_wray;
  logic               d_valid, d_ready, d_shadow;
  logic [RAYID_W-1:0] d_id;
  ray_t               d_ray;
  logic               sm_valid, sm_ready, lh_valid, lh_ready, ssm_valid, ssm_ready;
  logic               sh_valid, sh_ready;
  ray_result_t        lh_result;
  logic [$clog2(NUM_RAYS+1)-1:0] in_flight;

  // ---------------- scene intersection ----------------
  logic     si_valid, si_ready, si_miss;
  ray_tok_t si_tok;

  scene_int u_sint (
    .clk, .rst, .bbox_min, .bbox_max,
    .in_valid(d_valid), .in_ready(d_ready), .in_id(d_id), .in_shadow(d_shadow), .in_ray(d_ray),
    .out_valid(si_valid), .out_ready(si_ready), .out_tok(si_tok), .out_miss(si_miss));

  // ---------------- traversal loop ----------------
  logic [2:0] ta_in_valid, ta_in_ready;
  logic [$bits(ray_tok_t)-1:0] ta_in_data [3];
  logic       ta_valid, ta_ready;
  logic [$bits(ray_tok_t)-1:0] ta_data;
  logic [1:0] ta_src;

  logic       tn_in_valid, tn_in_ready, tn_valid, tn_ready;   // trav -> tarb FIFO
  ray_tok_t   tn_in, tn_out;
  logic       so_in_valid, so_in_ready, so_valid, so_ready;   // shortstack -> tarb FIFO
  ray_tok_t   so_out;

  logic       ss_init_valid, ss_init_ready;
  logic       ss_out_valid, ss_out_ready, ss_out_miss, ss_out_restart;
  ray_tok_t   ss_out_tok;

  assign ss_init_valid  = si_valid && !si_miss && ta_in_ready[2];
  assign ta_in_valid[2] = si_valid && !si_miss && ss_init_ready;
  assign sm_valid       = si_valid && si_miss;
  assign si_ready       = si_miss ? sm_ready : (ta_in_ready[2] && ss_init_ready);

  assign ta_in_valid[0] = tn_valid;
  assign ta_in_data[0]  = tn_out;
  assign tn_ready       = ta_in_ready[0];
  assign ta_in_valid[1] = so_valid;
  assign ta_in_data[1]  = so_out;
  assign so_ready       = ta_in_ready[1];
  assign ta_in_data[2]  = si_tok;

  arbiter #(.N(3), .WIDTH($bits(ray_tok_t))) u_tarb (
    .clk, .rst, .in_valid(ta_in_valid), .in_ready(ta_in_ready), .in_data(ta_in_data),
    .out_valid(ta_valid), .out_ready(ta_ready), .out_data(ta_data), .out_src(ta_src));

  ray_tok_t     ta_tok;
  logic [47:0]  node_word;
  assign ta_tok = ray_tok_t'(ta_data);

  simple_cache #(.WIDTH(48), .DEPTH(NODE_DEPTH)) u_tcache (
    .clk, .we(tc_we), .waddr(wr_addr[NAW-1:0]), .wdata(wr_data[47:0]),
    .raddr(ta_tok.node[NAW-1:0]), .rdata(node_word));

  logic [RAYID_W-1:0]  tr_rs_addr;
  ray_t                tr_rs_ray;
  logic                tr_valid, tr_ready;
  logic                tr_next, tr_push, tr_restart, tr_pop, tr_leaf;
  ray_tok_t            tr_next_tok;
  logic [NODEID_W-1:0] tr_push_node, tr_restart_node;
  fp24_t               tr_push_tmin, tr_push_tmax, tr_pop_t, tr_leaf_tmax;
  leaf_tok_t           tr_leaf_tok;

  raystore #(.NUM_RAYS(NUM_RAYS)) u_rs_trav (
    .clk, .we(rs_we), .waddr(rs_id), .wdata(rs_wray), .raddr(tr_rs_addr), .rdata(tr_rs_ray));

  trav_unit u_trav (
    .clk, .rst, .in_valid(ta_valid), .in_ready(ta_ready), .in_tok(ta_tok), .in_node(node_word),
    .rs_addr(tr_rs_addr), .rs_ray(tr_rs_ray),
    .out_valid(tr_valid), .out_ready(tr_ready),
    .do_next(tr_next), .next_tok(tr_next_tok),
    .do_push(tr_push), .push_node(tr_push_node), .push_tmin(tr_push_tmin),
    .push_tmax(tr_push_tmax), .do_restart(tr_restart), .restart_node(tr_restart_node),
    .do_pop(tr_pop), .pop_t(tr_pop_t),
    .do_leaf(tr_leaf), .leaf_tok(tr_leaf_tok), .leaf_tmax(tr_leaf_tmax));

  logic lf_in_valid, lf_in_ready, lf_valid, lf_ready;     // leaf FIFO -> larb
  leaf_tok_t lf_out;
  logic ss_ps_valid, ss_ps_ready, ss_pt_valid, ss_pt_ready;

  assign tr_ready = !tr_valid ||
                    ((!tr_next || tn_in_ready) && (!tr_pop || ss_pt_ready) &&
                     (!tr_leaf || lf_in_ready));
  assign tn_in_valid = tr_valid && tr_next && tr_ready;
  assign tn_in       = tr_next_tok;
  assign ss_ps_valid = tr_valid && (tr_push || tr_restart) && tn_in_ready;
  assign ss_pt_valid = tr_valid && tr_pop;
  assign lf_in_valid = tr_valid && tr_leaf;

  fifo #(.WIDTH($bits(ray_tok_t)), .DEPTH(NUM_RAYS)) u_tn_fifo (
    .clk, .rst, .in_valid(tn_in_valid), .in_ready(tn_in_ready), .in_data(tn_in),
    .out_valid(tn_valid), .out_ready(tn_ready), .out_data(tn_out), .count());

  fifo #(.WIDTH($bits(leaf_tok_t)), .DEPTH(NUM_RAYS)) u_leaf_fifo (
    .clk, .rst, .in_valid(lf_in_valid), .in_ready(lf_in_ready), .in_data(tr_leaf_tok),
    .out_valid(lf_valid), .out_ready(lf_ready), .out_data(lf_out), .count());

  // ---------------- short stack ----------------
  logic        ss_pl_valid, ss_pl_ready;
  logic        lu_valid, lu_ready, lu_hit;
  ray_result_t lu_result;
  fp24_t       lu_pop_t;

  assign ss_pl_valid = lu_valid && !lu_hit;

  shortstack #(.NUM_RAYS(NUM_RAYS), .DEPTH(SS_DEPTH)) u_ss (
    .clk, .rst,
    .ps_valid(ss_ps_valid), .ps_ready(ss_ps_ready), .ps_id(tr_next_tok.id), .ps_push(tr_push),
    .ps_node(tr_push_node), .ps_tmin(tr_push_tmin), .ps_tmax(tr_push_tmax),
    .ps_restart(tr_restart), .ps_restart_node(tr_restart_node),
    .pt_valid(ss_pt_valid), .pt_ready(ss_pt_ready), .pt_id(tr_next_tok.id), .pt_t(tr_pop_t),
    .pl_valid(ss_pl_valid), .pl_ready(ss_pl_ready), .pl_id(lu_result.id), .pl_t(lu_pop_t),
    .in_valid(ss_init_valid), .in_ready(ss_init_ready), .in_id(si_tok.id),
    .in_shadow(si_tok.shadow), .in_scene_tmax(si_tok.tmax),
    .out_valid(ss_out_valid), .out_ready(ss_out_ready), .out_tok(ss_out_tok),
    .out_miss(ss_out_miss), .out_restart(ss_out_restart));

  assign ssm_valid    = ss_out_valid && ss_out_miss;
  assign so_in_valid  = ss_out_valid && !ss_out_miss;
  assign ss_out_ready = ss_out_miss ? ssm_ready : so_in_ready;

  fifo #(.WIDTH($bits(ray_tok_t)), .DEPTH(NUM_RAYS)) u_so_fifo (
    .clk, .rst, .in_valid(so_in_valid), .in_ready(so_in_ready), .in_data(ss_out_tok),
    .out_valid(so_valid), .out_ready(so_ready), .out_data(so_out), .count());

  // ---------------- list / intersection loop ----------------
  logic [1:0] la_in_valid, la_in_ready;
  logic [$bits(leaf_tok_t)-1:0] la_in_data [2];
  logic       la_valid, la_ready;
  logic [$bits(leaf_tok_t)-1:0] la_data;
  logic [1:0] la_src;
  logic       in_nf_in_valid, in_nf_in_ready, in_nf_valid, in_nf_ready;
  leaf_tok_t  in_nf_out;

  assign la_in_valid = {lf_valid, in_nf_valid};
  assign la_in_data[0] = in_nf_out;
  assign la_in_data[1] = lf_out;
  assign in_nf_ready = la_in_ready[0];
  assign lf_ready    = la_in_ready[1];

  arbiter #(.N(2), .WIDTH($bits(leaf_tok_t))) u_larb (
    .clk, .rst, .in_valid(la_in_valid), .in_ready(la_in_ready), .in_data(la_in_data),
    .out_valid(la_valid), .out_ready(la_ready), .out_data(la_data), .out_src(la_src));

  leaf_tok_t          la_tok;
  logic [15:0]        tri_id;
  logic [287:0]       mat_word;
  ray_t               int_ray;
  assign la_tok = leaf_tok_t'(la_data);

  simple_cache #(.WIDTH(16), .DEPTH(LIST_DEPTH)) u_lcache (
    .clk, .we(lc_we), .waddr(wr_addr[LAW-1:0]), .wdata(wr_data[15:0]),
    .raddr(la_tok.lidx[LAW-1:0]), .rdata(tri_id));

  simple_cache #(.WIDTH(288), .DEPTH(TRI_DEPTH)) u_icache (
    .clk, .we(ic_we), .waddr(wr_addr[TAW-1:0]), .wdata(wr_data),
    .raddr(tri_id[TAW-1:0]), .rdata(mat_word));

  raystore #(.NUM_RAYS(NUM_RAYS)) u_rs_int (
    .clk, .we(rs_we), .waddr(rs_id), .wdata(rs_wray), .raddr(la_tok.id), .rdata(int_ray));

  logic               iu_valid, iu_ready, iu_list, iu_next, iu_shadow;
  leaf_tok_t          iu_next_tok;
  logic [RAYID_W-1:0] iu_id;
  logic               iu_hit, iu_last;
  logic [15:0]        iu_tri;
  fp24_t              iu_t, iu_u, iu_v;

  int_unit u_int (
    .clk, .rst, .in_valid(la_valid), .in_ready(la_ready), .in_tok(la_tok), .in_tri(tri_id),
    .in_mat(tri_mat_t'(mat_word)), .in_ray(int_ray),
    .out_valid(iu_valid), .out_ready(iu_ready), .do_list(iu_list), .do_next(iu_next),
    .do_shadow(iu_shadow), .next_tok(iu_next_tok), .res_id(iu_id), .res_hit(iu_hit),
    .res_last(iu_last), .res_tri(iu_tri), .res_t(iu_t), .res_u(iu_u), .res_v(iu_v));

  logic lres_valid, lres_ready;
  assign iu_ready = !iu_valid ||
                    ((!iu_list || lres_ready) && (!iu_next || in_nf_in_ready) &&
                     (!iu_shadow || sh_ready));
  assign lres_valid     = iu_valid && iu_list && (!iu_next || in_nf_in_ready);
  assign in_nf_in_valid = iu_valid && iu_next && (!iu_list || lres_ready);
  assign sh_valid       = iu_valid && iu_shadow;

  fifo #(.WIDTH($bits(leaf_tok_t)), .DEPTH(NUM_RAYS)) u_nf_fifo (
    .clk, .rst, .in_valid(in_nf_in_valid), .in_ready(in_nf_in_ready), .in_data(iu_next_tok),
    .out_valid(in_nf_valid), .out_ready(in_nf_ready), .out_data(in_nf_out), .count());

  logic [RAYID_W-1:0] lu_rs_addr;
  ray_t               lu_rs_ray;

  raystore #(.NUM_RAYS(NUM_RAYS)) u_rs_list (
    .clk, .we(rs_we), .waddr(rs_id), .wdata(rs_wray), .raddr(lu_rs_addr), .rdata(lu_rs_ray));

  list_unit #(.NUM_RAYS(NUM_RAYS)) u_list (
    .clk, .rst,
    .init_valid(lf_in_valid && lf_in_ready && tr_ready), .init_id(tr_leaf_tok.id),
    .init_tmax(tr_leaf_tmax),
    .res_valid(lres_valid), .res_ready(lres_ready), .res_id(iu_id), .res_hit(iu_hit),
    .res_last(iu_last), .res_tri(iu_tri), .res_t(iu_t), .res_u(iu_u), .res_v(iu_v),
    .rs_addr(lu_rs_addr), .rs_ray(lu_rs_ray),
    .out_valid(lu_valid), .out_ready(lu_ready), .out_hit(lu_hit), .out_result(lu_result),
    .out_pop_t(lu_pop_t));

  assign lh_valid  = lu_valid && lu_hit;
  assign lh_result = lu_result;
  assign lu_ready  = lu_hit ? lh_ready : ss_pl_ready;

  // ---------------- shader ----------------
  shader #(.NUM_RAYS(NUM_RAYS)) u_shader (
    .clk, .rst,
    .prim_valid(p_valid), .prim_ready(p_ready), .prim_ray(p_ray), .prim_pix(p_pix),
    .rs_we, .rs_id, .rs_ray(rs_wray),
    .disp_valid(d_valid), .disp_ready(d_ready), .disp_id(d_id), .disp_shadow(d_shadow),
    .disp_ray(d_ray),
    .sm_valid, .sm_ready, .sm_id(si_tok.id),
    .lh_valid, .lh_ready, .lh_result,
    .ss_valid(ssm_valid), .ss_ready(ssm_ready), .ss_id(ss_out_tok.id),
    .sh_valid, .sh_ready, .sh_id(iu_id),
    .pix_valid, .pix_ready, .pix_addr, .pix_color, .in_flight);

  // ---------------- events ----------------
  assign ev_scene_miss = sm_valid && sm_ready;
  assign ev_push       = ss_ps_valid && tr_push;
  assign ev_pop        = ss_out_valid && ss_out_ready && !ss_out_miss && !ss_out_restart;
  assign ev_restart    = ss_out_valid && ss_out_ready && ss_out_restart;
  assign ev_exit_miss  = ssm_valid && ssm_ready;
  assign ev_leaf       = lf_in_valid && lf_in_ready && tr_ready;
  assign ev_tri_test   = la_valid && la_ready;
  assign ev_hit        = lh_valid && lh_ready;
  assign ev_stall      = pix_valid && !pix_ready;

  logic unused;
  assign unused = ^{ta_src, la_src, p_done, ss_ps_ready, in_flight, lu_result.hit};
endmodule
