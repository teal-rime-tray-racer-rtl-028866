// shortstack: per-ray short stack of k-d tree nodes still to visit, plus a restart node.
//
// For every ray ID it keeps a DEPTH-entry stack of {node, tmin, tmax}, a restart node, the
// ray's exit time from the scene box (scene tmax) and its shadow flag. A push onto a full
// stack overwrites the oldest entry, so entries can be lost; the restart node makes up for
// that. Requests, one per cycle, in fixed priority:
//  1. push / restart write from the traversal unit (always accepted: ps_ready is high),
//  2. pop request from the traversal unit (empty leaf or empty child),
//  3. pop request from the list unit (all triangles of a leaf missed),
//  4. init from the scene intersection unit (empty stack, restart node = root).
// A pop request carries the t at which the ray left the last node (pop_t). If the stack holds
// an entry it is popped and returned as a ray token for the traversal arbiter. If it is empty
// and pop_t >= scene tmax the ray has left the scene: out_miss (to the shader). Otherwise the
// ray restarts at its restart node over [pop_t, scene tmax]. Results leave through one
// output register (valid/ready); pops wait while it is full.
// The 4-deep stack, overwrite-on-full, the restart node and the miss test follow the report.
// The report's unit arbitrates many ports fairly; here a fixed priority is used, and the
// push port never stalls so a ray's push is stored before it can ask for a pop.
module shortstack
  import rt_pkg::*;
#(
  parameter int NUM_RAYS = 512,
  parameter int DEPTH    = 4
) (
  input  logic               clk,
  input  logic               rst,
  // push and/or restart-node write from the traversal unit
  input  logic               ps_valid,
  output logic               ps_ready,
  input  logic [RAYID_W-1:0] ps_id,
  input  logic               ps_push,
  input  logic [NODEID_W-1:0] ps_node,
  input  fp24_t              ps_tmin,
  input  fp24_t              ps_tmax,
  input  logic               ps_restart,
  input  logic [NODEID_W-1:0] ps_restart_node,
  // pop request from the traversal unit
  input  logic               pt_valid,
  output logic               pt_ready,
  input  logic [RAYID_W-1:0] pt_id,
  input  fp24_t              pt_t,
  // pop request from the list unit
  input  logic               pl_valid,
  output logic               pl_ready,
  input  logic [RAYID_W-1:0] pl_id,
  input  fp24_t              pl_t,
  // init from the scene intersection unit
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [RAYID_W-1:0] in_id,
  input  logic               in_shadow,
  input  fp24_t              in_scene_tmax,
  // result
  output logic               out_valid,
  input  logic               out_ready,
  output ray_tok_t           out_tok,
  output logic               out_miss,
  output logic               out_restart   // result was a restart (for monitoring)
);
  localparam int SW = $clog2(DEPTH);

  typedef struct packed {
    logic [NODEID_W-1:0] node;
    fp24_t               tmin;
    fp24_t               tmax;
  } entry_t;

  entry_t              stack_mem [NUM_RAYS][DEPTH];
  logic [SW-1:0]       top_mem   [NUM_RAYS];
  logic [SW:0]         cnt_mem   [NUM_RAYS];
  logic [NODEID_W-1:0] rst_node  [NUM_RAYS];
  logic                have_rst  [NUM_RAYS];
  logic                shadow_mem[NUM_RAYS];
  fp24_t               stmax_mem [NUM_RAYS];

  logic               out_free;
  logic               pop_go, pop_from_trav;
  logic [RAYID_W-1:0] pop_id;
  fp24_t              pop_t;
  logic [SW-1:0]      ptop;
  logic [SW:0]        pcnt;

  assign out_free = !out_valid || out_ready;
  assign ps_ready = 1'b1;
  assign pt_ready = !ps_valid && out_free;
  assign pl_ready = !ps_valid && !pt_valid && out_free;
  assign in_ready = !ps_valid && !pt_valid && !pl_valid;

  assign pop_from_trav = pt_valid && pt_ready;
  assign pop_go        = pop_from_trav || (pl_valid && pl_ready);
  assign pop_id        = pop_from_trav ? pt_id : pl_id;
  assign pop_t         = pop_from_trav ? pt_t : pl_t;
  assign ptop          = top_mem[pop_id];
  assign pcnt          = cnt_mem[pop_id];

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      out_tok     <= '0;
      out_miss    <= 1'b0;
      out_restart <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (pop_go) begin
        out_valid                <= 1'b1;
        out_tok.id               <= pop_id;
        out_tok.shadow           <= shadow_mem[pop_id];
        out_tok.restart_search   <= !have_rst[pop_id];
        out_miss                 <= 1'b0;
        out_restart              <= 1'b0;
        if (pcnt != 0) begin
          out_tok.node <= stack_mem[pop_id][ptop].node;
          out_tok.tmin <= stack_mem[pop_id][ptop].tmin;
          out_tok.tmax <= stack_mem[pop_id][ptop].tmax;
        end else begin
          out_tok.node <= rst_node[pop_id];
          out_tok.tmin <= pop_t;
          out_tok.tmax <= stmax_mem[pop_id];
          if (fp_le(stmax_mem[pop_id], pop_t)) out_miss <= 1'b1;
          else                                 out_restart <= 1'b1;
        end
      end
    end
  end

  // per-ray state (memories)
  always_ff @(posedge clk) begin
    if (ps_valid) begin
      if (ps_push) begin
        stack_mem[ps_id][top_mem[ps_id] + 1'b1] <= '{node: ps_node, tmin: ps_tmin, tmax: ps_tmax};
        top_mem[ps_id] <= top_mem[ps_id] + 1'b1;
        if (cnt_mem[ps_id] != (SW+1)'(DEPTH)) cnt_mem[ps_id] <= cnt_mem[ps_id] + 1'b1;
      end
      if (ps_restart) begin
        rst_node[ps_id] <= ps_restart_node;
        have_rst[ps_id] <= 1'b1;
      end
    end else if (pop_go) begin
      if (pcnt != 0) begin
        top_mem[pop_id] <= ptop - 1'b1;
        cnt_mem[pop_id] <= pcnt - 1'b1;
      end
    end else if (in_valid) begin
      top_mem[in_id]    <= '0;
      cnt_mem[in_id]    <= '0;
      rst_node[in_id]   <= '0;
      have_rst[in_id]   <= 1'b0;
      shadow_mem[in_id] <= in_shadow;
      stmax_mem[in_id]  <= in_scene_tmax;
    end
  end
endmodule
