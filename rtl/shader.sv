// shader: first-version shader. Hands out ray IDs, dispatches primary rays into the ray pipe
// and turns returning rays into pixel colours.
//
// A queue of free ray IDs is filled with 0 .. NUM_RAYS-1 after reset. When a primary ray
// (ray + pixel index) is offered and an ID is free, the shader takes the ID, records the
// pixel index under it, writes the ray into the raystores (rs_we) and sends it, with the ID,
// to the scene intersection unit. A ray comes back as a miss from the scene intersection
// unit (missed the scene box), a hit from the list unit, a miss from the short stack (left
// the scene) or an occluded shadow ray from the intersection unit; one is accepted per cycle
// in that priority. Its colour is computed (BG_COLOR for a miss, a colour derived from the
// triangle ID for a hit: ((tri_id + 1) * 0x3A95) mod 2^16 as RGB565), it leaves as
// {pixel index, colour} for the pixel buffer, and its ID returns to the free queue. When the
// pixel buffer stalls, retirement stops and the stall spreads back into the pipe.
// The ID queue, the pixel index storage and colouring by miss / triangle ID follow the
// report; the colour formula and the background colour are this design's.
module shader
  import rt_pkg::*;
#(
  parameter int          NUM_RAYS = 512,
  parameter logic [15:0] BG_COLOR = 16'h0010
) (
  input  logic               clk,
  input  logic               rst,
  // primary rays
  input  logic               prim_valid,
  output logic               prim_ready,
  input  ray_t               prim_ray,
  input  logic [18:0]        prim_pix,
  // dispatch
  output logic               rs_we,
  output logic [RAYID_W-1:0] rs_id,
  output ray_t               rs_ray,
  output logic               disp_valid,
  input  logic               disp_ready,
  output logic [RAYID_W-1:0] disp_id,
  output logic               disp_shadow,
  output ray_t               disp_ray,
  // returning rays
  input  logic               sm_valid,     // scene box miss
  output logic               sm_ready,
  input  logic [RAYID_W-1:0] sm_id,
  input  logic               lh_valid,     // hit from the list unit
  output logic               lh_ready,
  input  ray_result_t        lh_result,
  input  logic               ss_valid,     // miss from the short stack
  output logic               ss_ready,
  input  logic [RAYID_W-1:0] ss_id,
  input  logic               sh_valid,     // occluded shadow ray
  output logic               sh_ready,
  input  logic [RAYID_W-1:0] sh_id,
  // finished pixels
  output logic               pix_valid,
  input  logic               pix_ready,
  output logic [18:0]        pix_addr,
  output logic [15:0]        pix_color,
  output logic [$clog2(NUM_RAYS+1)-1:0] in_flight
);
  localparam int CW = $clog2(NUM_RAYS + 1);

  logic [18:0]        pix_mem [NUM_RAYS];
  logic [CW-1:0]      fill_cnt;
  logic               filling;
  logic               id_in_valid, id_in_ready, id_out_valid, id_out_ready;
  logic [RAYID_W-1:0] id_in, id_out;
  logic [CW-1:0]      id_count;
  logic               dispatch, retire;
  logic [RAYID_W-1:0] ret_id;
  logic               ret_hit;
  logic [TRIID_W-1:0] ret_tri;
  logic               out_free;

  assign filling = (fill_cnt != CW'(NUM_RAYS));

  fifo #(.WIDTH(RAYID_W), .DEPTH(NUM_RAYS)) u_ids (
    .clk, .rst,
    .in_valid(id_in_valid), .in_ready(id_in_ready), .in_data(id_in),
    .out_valid(id_out_valid), .out_ready(id_out_ready), .out_data(id_out),
    .count(id_count));

  // dispatch: needs a free ID and room in the dispatch register
  assign prim_ready   = id_out_valid && !filling && (!disp_valid || disp_ready);
  assign dispatch     = prim_valid && prim_ready;
  assign id_out_ready = dispatch;
  assign rs_we        = dispatch;
  assign rs_id        = id_out;
  assign rs_ray       = prim_ray;

  // retirement, fixed priority
  assign out_free = !pix_valid || pix_ready;
  assign sm_ready = out_free && !filling;
  assign lh_ready = out_free && !filling && !sm_valid;
  assign ss_ready = out_free && !filling && !sm_valid && !lh_valid;
  assign sh_ready = out_free && !filling && !sm_valid && !lh_valid && !ss_valid;
  assign retire   = (sm_valid && sm_ready) || (lh_valid && lh_ready) ||
                    (ss_valid && ss_ready) || (sh_valid && sh_ready);

  always_comb begin
    ret_hit = 1'b0;
    ret_tri = '0;
    if (sm_valid)      ret_id = sm_id;
    else if (lh_valid) begin
      ret_id  = lh_result.id;
      ret_hit = 1'b1;
      ret_tri = lh_result.tri_id;
    end
    else if (ss_valid) ret_id = ss_id;
    else               ret_id = sh_id;
  end

  assign id_in_valid = filling || retire;
  assign id_in       = filling ? fill_cnt[RAYID_W-1:0] : ret_id;

  always_ff @(posedge clk) begin
    if (dispatch) pix_mem[id_out] <= prim_pix;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fill_cnt    <= '0;
      disp_valid  <= 1'b0;
      disp_id     <= '0;
      disp_shadow <= 1'b0;
      disp_ray    <= '0;
      pix_valid   <= 1'b0;
      pix_addr    <= '0;
      pix_color   <= '0;
      in_flight   <= '0;
    end else begin
      if (filling) fill_cnt <= fill_cnt + 1'b1;
      if (disp_valid && disp_ready) disp_valid <= 1'b0;
      if (dispatch) begin
        disp_valid  <= 1'b1;
        disp_id     <= id_out;
        disp_shadow <= 1'b0;
        disp_ray    <= prim_ray;
      end
      if (pix_valid && pix_ready) pix_valid <= 1'b0;
      if (retire) begin
        pix_valid <= 1'b1;
        pix_addr  <= pix_mem[ret_id];
        pix_color <= ret_hit ? 16'((32'(ret_tri) + 32'd1) * 32'h3A95) : BG_COLOR;
      end
      in_flight <= in_flight + (dispatch ? 1'b1 : 1'b0) - (retire ? 1'b1 : 1'b0);
    end
  end

  a_id_queue_never_full: assert property (@(posedge clk) disable iff (rst)
    id_in_valid |-> id_in_ready);
endmodule
