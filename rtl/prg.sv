// prg: primary ray generator with dynamic resolution and ray packeting.
//
// On start the generator latches the camera (E, U, V, W) and the resolution level
// res_level (0..5). Level k renders (640>>k) x (480>>k) rays, from 640x480 down to 20x15.
// Rays leave in 20x15 packets: all rays of one packet (raster order inside it) before the
// next packet, packets in raster order, so that neighbouring rays follow each other and
// touch the same parts of the scene. For low-resolution pixel (x, y) the ray is
//   origin = E,  dir = W + sx*U + sy*V,
//   sx = ((2x+1)*2^k - 640)/640,  sy = (480 - (2y+1)*2^k)/640,
// i.e. a screen 2 units wide at distance 1 with square pixels, sampled at pixel centres.
// pix_id = y*(640>>k) + x is the pixel's index in the low-resolution image. Output is a
// valid/ready stream with one registered ray per cycle; done pulses after the last ray is
// accepted. The six levels, the 20x15 packets and the use of the camera vectors follow the
// report; the screen geometry, the packet order and the unnormalised direction are this
// design's choice.
module prg
  import rt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [2:0]  res_level,
  input  vec3_t       cam_e,
  input  vec3_t       cam_u,
  input  vec3_t       cam_v,
  input  vec3_t       cam_w,
  output logic        out_valid,
  input  logic        out_ready,
  output ray_t        out_ray,
  output logic [18:0] out_pix,
  output logic        active,
  output logic [2:0]  level,
  output logic        done
);
  localparam fp24_t INV640 = 24'h3ACCCC;

  vec3_t       e, u, v, w;
  logic [4:0]  px;          // 0..19 inside the packet
  logic [3:0]  py;          // 0..14
  logic [5:0]  bx, by;      // packet column / row
  logic [9:0]  x, y;
  logic [5:0]  nblk;
  fp24_t       sx, sy;
  vec3_t       d;
  logic        adv;
  logic        last;

  always_comb begin
    nblk = 6'd32 >> level;
    x    = 10'(bx * 20 + px);
    y    = 10'(by * 15 + py);
    sx   = fp_mul(fp_from_int(32'((({22'd0, x} << 1) + 1) << level) - 32'sd640), INV640);
    sy   = fp_mul(fp_from_int(32'sd480 - 32'((({22'd0, y} << 1) + 1) << level)), INV640);
    d    = vadd(w, vadd(vscale(u, sx), vscale(v, sy)));
    adv  = active && (!out_valid || out_ready);
    last = (px == 5'd19) && (py == 4'd14) && (bx == nblk - 1) && (by == nblk - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      out_valid <= 1'b0;
      out_ray   <= '0;
      out_pix   <= '0;
      level     <= '0;
      done      <= 1'b0;
      {px, py, bx, by} <= '0;
      {e, u, v, w} <= '0;
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        level  <= (res_level > 3'd5) ? 3'd5 : res_level;
        e <= cam_e; u <= cam_u; v <= cam_v; w <= cam_w;
        {px, py, bx, by} <= '0;
      end else if (adv) begin
        out_valid    <= 1'b1;
        out_ray.orig <= e;
        out_ray.dir  <= d;
        out_pix      <= 19'(y * (10'd640 >> level) + x);
        if (px != 5'd19) px <= px + 1'b1;
        else begin
          px <= '0;
          if (py != 4'd14) py <= py + 1'b1;
          else begin
            py <= '0;
            if (bx != nblk - 1) bx <= bx + 1'b1;
            else begin
              bx <= '0;
              by <= by + 1'b1;
            end
          end
        end
        if (last) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
