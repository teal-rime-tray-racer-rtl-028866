// trav_unit: one k-d tree traversal step for one ray per cycle.
//
// Input: a ray token (ID, node ID, [tmin, tmax] of the node, restart-search bit) together
// with the node word fetched from the traversal cache. The ray's vectors come from a raystore
// copy (rs_addr / rs_ray). One registered result per cycle, with these destinations:
//  * leaf with triangles: to the list unit (initialise with the leaf's tmax) and the list
//    arbiter (first triangle: list index and count)            -> do_leaf
//  * leaf without triangles, or a next child that is empty: ask the short stack for a pop,
//    giving the t where this part of the ray ends              -> do_pop, pop_t
//  * interior node: tmid = (split - o[axis]) / d[axis]. The near child is the one on the
//    origin's side of the plane. If tmid >= tmax or tmid <= 0 only the near child is crossed;
//    if tmid <= tmin only the far child; otherwise the near one over [tmin, tmid] and the far
//    one over [tmid, tmax]. The comparisons include equality so that no child is ever
//    entered over an empty interval: a restart at t = tmin then always makes progress. The child taken first goes back to the traversal arbiter
//    (do_next, next_tok) and, when both are crossed and the far one is not empty, the far
//    one is pushed on the short stack (do_push). The first time a ray must cross both
//    children its restart-search bit is cleared and the current node is stored as its
//    restart node (do_restart).
// The step, the children's empty flags, the restart bit and the destinations follow the
// report. The report names the implicit child both ways ("the left node = parent node + 1"
// for the traversal unit, "the right child is one greater" for the scene file); this design
// follows the traversal unit: left = node + 1, right child explicit. The handshake is this
// design's: out_ready must be high only when every destination the result needs can take it.
module trav_unit
  import rt_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  output logic               in_ready,
  input  ray_tok_t           in_tok,
  input  logic [47:0]        in_node,
  output logic [RAYID_W-1:0] rs_addr,
  input  ray_t               rs_ray,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               do_next,
  output ray_tok_t           next_tok,
  output logic               do_push,
  output logic [NODEID_W-1:0] push_node,
  output fp24_t              push_tmin,
  output fp24_t              push_tmax,
  output logic               do_restart,
  output logic [NODEID_W-1:0] restart_node,
  output logic               do_pop,
  output fp24_t              pop_t,
  output logic               do_leaf,
  output leaf_tok_t          leaf_tok,
  output fp24_t              leaf_tmax
);
  kd_inner_t n;
  kd_leaf_t  l;
  logic      is_leaf;
  fp24_t     o, d, tmid;
  logic      below_first;
  logic [NODEID_W-1:0] first, second;
  logic      first_empty, second_empty;

  logic      c_next, c_push, c_restart, c_pop, c_leaf;
  ray_tok_t  c_tok;
  fp24_t     c_pop_t;

  assign n       = kd_inner_t'(in_node);
  assign l       = kd_leaf_t'(in_node);
  assign is_leaf = (in_node[47:46] == 2'b11);
  assign rs_addr = in_tok.id;

  always_comb begin
    o    = vec_comp(rs_ray.orig, n.axis);
    d    = vec_comp(rs_ray.dir, n.axis);
    tmid = fp_div(fp_sub(n.split, o), d);
    below_first = fp_lt(o, n.split) || (o == n.split && fp_le(d, FP_ZERO));
    first        = below_first ? in_tok.node + 1'b1 : n.right;
    second       = below_first ? n.right : in_tok.node + 1'b1;
    first_empty  = below_first ? n.lempty : n.rempty;
    second_empty = below_first ? n.rempty : n.lempty;

    c_next    = 1'b0;
    c_push    = 1'b0;
    c_restart = 1'b0;
    c_pop     = 1'b0;
    c_leaf    = 1'b0;
    c_tok     = in_tok;
    c_pop_t   = in_tok.tmax;

    if (is_leaf) begin
      if (l.ntri == 0) c_pop  = 1'b1;
      else             c_leaf = 1'b1;
    end else if (fp_le(in_tok.tmax, tmid) || fp_le(tmid, FP_ZERO)) begin
      // only the near child
      if (first_empty) c_pop = 1'b1;
      else begin
        c_next = 1'b1;
        c_tok.node = first;
      end
    end else if (fp_le(tmid, in_tok.tmin)) begin
      // only the far child
      if (second_empty) c_pop = 1'b1;
      else begin
        c_next = 1'b1;
        c_tok.node = second;
      end
    end else begin
      // both children; a ray that goes nowhere needs no restart node
      if (in_tok.restart_search && !(first_empty && second_empty)) begin
        c_restart = 1'b1;
        c_tok.restart_search = 1'b0;
      end
      if (first_empty && second_empty) c_pop = 1'b1;
      else if (first_empty) begin
        c_next = 1'b1;
        c_tok.node = second;
        c_tok.tmin = tmid;
      end else begin
        c_next = 1'b1;
        c_tok.node = first;
        c_tok.tmax = tmid;
        c_push = !second_empty;
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid    <= 1'b0;
      do_next      <= 1'b0;
      do_push      <= 1'b0;
      do_restart   <= 1'b0;
      do_pop       <= 1'b0;
      do_leaf      <= 1'b0;
      next_tok     <= '0;
      push_node    <= '0;
      push_tmin    <= '0;
      push_tmax    <= '0;
      restart_node <= '0;
      pop_t        <= '0;
      leaf_tok     <= '0;
      leaf_tmax    <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        do_next      <= c_next;
        do_push      <= c_push;
        do_restart   <= c_restart;
        do_pop       <= c_pop;
        do_leaf      <= c_leaf;
        next_tok     <= c_tok;
        push_node    <= second;
        push_tmin    <= tmid;
        push_tmax    <= in_tok.tmax;
        restart_node <= in_tok.node;
        pop_t        <= c_pop_t;
        leaf_tok     <= '{id: in_tok.id, shadow: in_tok.shadow, lidx: l.lidx, left: l.ntri};
        leaf_tmax    <= in_tok.tmax;
      end
    end
  end

  a_one_path: assert property (@(posedge clk) disable iff (rst)
    out_valid |-> $onehot({do_next, do_pop, do_leaf}));
endmodule
