// camera_ctl: camera position and orientation registers driven by the keyboard.
//
// The camera is a position E and three unit vectors: U (right), V (up) and W (forward).
// Translation keys (scan code set 2): W/S move along +W/-W, D/A along +U/-U, Q/E along
// +V/-V. Pressing one requests a frame (frame_start) and starts a cycle counter. When the
// frame in flight finishes (frame_done) and the key is still held, the new position
// E + dir * (count * scale) is computed by a short float datapath, the counter restarts and
// a new frame is requested, so the distance moved is proportional to how long the key was
// held. Releasing the key clears the counter. The speed keys 7, 8, 9 and 0 select
// 1, 2, 4 or 8 units per second (scale = speed / CLK_HZ per cycle); 7 is the reset default.
// Rotation keys rotate by 45 degrees, once per press: J/L yaw about V, I/K pitch about U and
// U/O roll about W, using only adds and a multiply by 1/sqrt(2) (new = (a +- b)/sqrt(2)).
// scene_loaded requests the first frame. A frame is never requested while one is in flight
// (busy); a request that arrives then is kept and issued at frame_done.
// The key behaviour, the 45-degree steps, the four speeds and 1 unit/s at the default follow
// the report; the key-to-axis mapping, which speed key is the default and the initial camera
// (INIT_E, looking down +Z with +Y up) are this design's choice.
module camera_ctl
  import rt_pkg::*;
#(
  parameter int    CLK_HZ = 50_000_000,
  parameter fp24_t INIT_EX = 24'h000000,
  parameter fp24_t INIT_EY = 24'h000000,
  parameter fp24_t INIT_EZ = 24'hC12000   // -10.0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       key_valid,
  input  logic [7:0] key_code,
  input  logic       key_pressed,
  input  logic       scene_loaded,
  input  logic       frame_done,
  output logic       frame_start,
  output logic       busy,
  output vec3_t      cam_e,
  output vec3_t      cam_u,
  output vec3_t      cam_v,
  output vec3_t      cam_w,
  output logic       moved,        // a position update was applied (for monitoring)
  output logic       rotated       // a rotation was applied (for monitoring)
);
  localparam logic [7:0] K_Q = 8'h15, K_W = 8'h1D, K_E = 8'h24, K_A = 8'h1C, K_S = 8'h1B,
                         K_D = 8'h23, K_U = 8'h3C, K_I = 8'h43, K_O = 8'h44, K_J = 8'h3B,
                         K_K = 8'h42, K_L = 8'h4B, K_7 = 8'h3D, K_8 = 8'h3E, K_9 = 8'h46,
                         K_0 = 8'h45;

  logic [5:0]  held;        // one bit per translation key: W S D A Q E
  logic [31:0] count;
  logic [1:0]  speed;
  logic        pending;
  logic        loaded_q;
  fp24_t       scale;
  fp24_t       dist_f;
  vec3_t       step;

  // Rotation by 45 degrees in the plane of two camera axes p and q:
  //   p' = (p + sg*q)/sqrt2, q' = (q - sg*p)/sqrt2.
  // The key selects p, q and the sign; one shared datapath does all six rotations.
  logic  [1:0] rot_p, rot_q;     // 0 = U, 1 = V, 2 = W
  logic        rot_neg;
  vec3_t       rp, rq, p_new, q_new;

  function automatic vec3_t pick(logic [1:0] s, vec3_t u, vec3_t v, vec3_t w);
    return (s == 2'd0) ? u : (s == 2'd1) ? v : w;
  endfunction

  function automatic vec3_t vneg_if(vec3_t a, logic c);
    return '{x: {a.x[23] ^ c, a.x[22:0]}, y: {a.y[23] ^ c, a.y[22:0]},
             z: {a.z[23] ^ c, a.z[22:0]}};
  endfunction

  function automatic vec3_t vmask(vec3_t a, logic c);
    return c ? a : '0;
  endfunction

  // speed / CLK_HZ, computed once per speed setting
  always_comb begin
    scale  = fp_div(fp_from_int(32'(1) <<< speed), fp_from_int(32'(CLK_HZ)));
    dist_f = fp_mul(fp_from_int(count), scale);
    // sum of the held directions; every adder is always in use (operands are masked)
    step = vadd(vadd(vsub(vmask(cam_w, held[0]), vmask(cam_w, held[1])),
                     vsub(vmask(cam_u, held[2]), vmask(cam_u, held[3]))),
                vsub(vmask(cam_v, held[4]), vmask(cam_v, held[5])));
    case (key_code)
      K_J:     begin rot_p = 2'd2; rot_q = 2'd0; rot_neg = 1'b1; end
      K_L:     begin rot_p = 2'd2; rot_q = 2'd0; rot_neg = 1'b0; end
      K_I:     begin rot_p = 2'd2; rot_q = 2'd1; rot_neg = 1'b0; end
      K_K:     begin rot_p = 2'd2; rot_q = 2'd1; rot_neg = 1'b1; end
      K_U:     begin rot_p = 2'd0; rot_q = 2'd1; rot_neg = 1'b0; end
      default: begin rot_p = 2'd0; rot_q = 2'd1; rot_neg = 1'b1; end   // O
    endcase
    rp    = pick(rot_p, cam_u, cam_v, cam_w);
    rq    = pick(rot_q, cam_u, cam_v, cam_w);
    p_new = vscale(vadd(rp, vneg_if(rq, rot_neg)), FP_RSQRT2);
    q_new = vscale(vsub(rq, vneg_if(rp, rot_neg)), FP_RSQRT2);
  end

  function automatic int tkey(logic [7:0] c);
    case (c)
      K_W: return 0;
      K_S: return 1;
      K_D: return 2;
      K_A: return 3;
      K_Q: return 4;
      K_E: return 5;
      default: return -1;
    endcase
  endfunction

  int tk;   // translation key index, -1 for other keys
  assign tk = tkey(key_code);

  always_ff @(posedge clk) begin
    if (rst) begin
      held        <= '0;
      count       <= '0;
      speed       <= '0;
      pending     <= 1'b0;
      busy        <= 1'b0;
      loaded_q    <= 1'b0;
      frame_start <= 1'b0;
      moved       <= 1'b0;
      rotated     <= 1'b0;
      cam_e       <= '{x: INIT_EX, y: INIT_EY, z: INIT_EZ};
      cam_u       <= '{x: FP_ONE, y: FP_ZERO, z: FP_ZERO};
      cam_v       <= '{x: FP_ZERO, y: FP_ONE, z: FP_ZERO};
      cam_w       <= '{x: FP_ZERO, y: FP_ZERO, z: FP_ONE};
    end else begin
      frame_start <= 1'b0;
      moved       <= 1'b0;
      rotated     <= 1'b0;
      loaded_q    <= scene_loaded;
      if (scene_loaded && !loaded_q) pending <= 1'b1;
      if (held != 0) count <= count + 1'b1;

      if (key_valid) begin
        if (tk >= 0) begin
          if (key_pressed && !held[tk]) begin
            held[tk] <= 1'b1;
            pending <= 1'b1;
          end else if (!key_pressed) begin
            held[tk] <= 1'b0;
            if (held == (6'b1 << tk)) count <= '0;
          end
        end
        if (key_pressed) begin
          case (key_code)
            K_7: speed <= 2'd0;
            K_8: speed <= 2'd1;
            K_9: speed <= 2'd2;
            K_0: speed <= 2'd3;
            K_J, K_L, K_I, K_K, K_U, K_O: begin
              case (rot_p)
                2'd0:    cam_u <= p_new;
                2'd1:    cam_v <= p_new;
                default: cam_w <= p_new;
              endcase
              case (rot_q)
                2'd0:    cam_u <= q_new;
                2'd1:    cam_v <= q_new;
                default: cam_w <= q_new;
              endcase
            end
            default: ;
          endcase
          case (key_code)
            K_J, K_L, K_I, K_K, K_U, K_O: begin
              pending <= 1'b1;
              rotated <= 1'b1;
            end
            default: ;
          endcase
        end
      end

      if (frame_done && busy) begin
        busy <= 1'b0;
        if (held != 0) begin
          // move by the distance covered while the key was held, then render again
          cam_e   <= vadd(cam_e, vscale(step, dist_f));
          count   <= '0;
          moved   <= 1'b1;
          pending <= 1'b1;
        end
      end else if (pending && !busy) begin
        frame_start <= 1'b1;
        busy        <= 1'b1;
        pending     <= 1'b0;
      end
    end
  end
endmodule
