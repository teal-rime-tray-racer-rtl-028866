// tb_camera_ctl: key sequences against expected camera positions, orientations and frame
// requests, computed in real numbers.
//
// CLK_HZ is set to 1024 so that one unit per second is 1/1024 unit per clock. Checked:
// the first frame after the scene is loaded; holding W moves the camera along +W by the
// time held (within two clocks) at each frame end and keeps requesting frames; releasing it
// stops both; speed key 0 gives eight times the rate along -U with A; the six rotation keys
// turn two axes by 45 degrees (compared with a rotation done in reals), J followed by L
// returns the original axes, and the axes stay orthonormal; a rotation while a frame is in
// flight requests its frame only after frame_done. Keys are driven as single-clock events
// at the falling edge.
module tb_camera_ctl;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  localparam int HZ = 1024;

  logic clk = 0, rst = 1;
  logic key_valid = 0, key_pressed = 0, scene_loaded = 0, frame_done = 0;
  logic [7:0] key_code = '0;
  logic frame_start, busy, moved, rotated;
  vec3_t cam_e, cam_u, cam_v, cam_w;
  always #5 clk = ~clk;

  camera_ctl #(.CLK_HZ(HZ)) dut (.*);

  int checks = 0, failures = 0, n_frames = 0;
  always @(posedge clk) if (!rst && frame_start) n_frames++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  typedef real v3[3];
  function automatic v3 rv(vec3_t a);
    v3 r; r[0] = to_real(a.x); r[1] = to_real(a.y); r[2] = to_real(a.z); return r;
  endfunction
  function automatic bit vnear(vec3_t a, v3 b, real tol);
    v3 r = rv(a);
    for (int i = 0; i < 3; i++) if (r[i] - b[i] > tol || b[i] - r[i] > tol) return 0;
    return 1;
  endfunction
  function automatic real dot(v3 a, v3 b);
    return a[0] * b[0] + a[1] * b[1] + a[2] * b[2];
  endfunction

  task automatic key(logic [7:0] code, bit press);
    @(negedge clk);
    key_valid = 1; key_code = code; key_pressed = press;
    @(negedge clk);
    key_valid = 0;
  endtask

  task automatic done();
    @(negedge clk); frame_done = 1;
    @(negedge clk); frame_done = 0;
  endtask

  task automatic rot_check(logic [7:0] code, int p, int q, bit neg);
    v3 a[3], e[3];
    real s = neg ? -1.0 : 1.0;
    int f0;
    a[0] = rv(cam_u); a[1] = rv(cam_v); a[2] = rv(cam_w);
    e = a;
    for (int i = 0; i < 3; i++) begin
      e[p][i] = (a[p][i] + s * a[q][i]) / $sqrt(2.0);
      e[q][i] = (a[q][i] - s * a[p][i]) / $sqrt(2.0);
    end
    f0 = n_frames;
    key(code, 1);
    repeat (2) @(negedge clk);
    chk(vnear(cam_u, e[0], 2e-3) && vnear(cam_v, e[1], 2e-3) && vnear(cam_w, e[2], 2e-3),
        $sformatf("rotation key %h gives the wrong axes", code));
    chk(n_frames == f0 + 1, "rotation did not request one frame");
    key(code, 0);
    done();
  endtask

  initial begin
    real z0, x0, dz, dx;
    int  t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (2) @(negedge clk);
    chk(n_frames == 0 && !busy, "frame before the scene is loaded");
    scene_loaded = 1;
    repeat (3) @(negedge clk);
    chk(n_frames == 1 && busy, "no frame after scene load");
    done();
    repeat (5) @(negedge clk);
    chk(n_frames == 1 && !busy, "frame repeated without a change");
    chk(vnear(cam_e, '{0.0, 0.0, -10.0}, 1e-6), "initial position");

    // hold W for about 300 clocks at 1 unit/s
    z0 = to_real(cam_e.z);
    key(8'h1D, 1);
    t0 = int'($time / 10);
    repeat (300) @(negedge clk);
    t1 = int'($time / 10);
    done();
    dz = to_real(cam_e.z) - z0;
    chk(dz > real'(t1 - t0 - 2) / HZ && dz < real'(t1 - t0 + 3) / HZ,
        $sformatf("moved %f along W, expected about %f", dz, real'(t1 - t0) / HZ));
    chk(to_real(cam_e.x) == 0.0 && to_real(cam_e.y) == 0.0, "moved off the W axis");
    repeat (3) @(negedge clk);
    chk(n_frames == 3, "no new frame while the key is held");
    key(8'h1D, 0);
    repeat (50) @(negedge clk);
    z0 = to_real(cam_e.z);
    done();
    repeat (5) @(negedge clk);
    chk(to_real(cam_e.z) == z0 && n_frames == 3 && !busy, "moved or rendered after release");

    // speed 3 (8 units/s), hold A for about 128 clocks: -U by about 1 unit
    key(8'h45, 1); key(8'h45, 0);
    x0 = to_real(cam_e.x);
    key(8'h1C, 1);
    t0 = int'($time / 10);
    repeat (128) @(negedge clk);
    t1 = int'($time / 10);
    done();
    dx = x0 - to_real(cam_e.x);
    chk(dx > 8.0 * real'(t1 - t0 - 2) / HZ && dx < 8.0 * real'(t1 - t0 + 3) / HZ,
        $sformatf("fast move %f, expected about %f", dx, 8.0 * real'(t1 - t0) / HZ));
    key(8'h1C, 0);
    done();
    repeat (3) @(negedge clk);

    // rotations: J/L about V (W,U), I/K about U (W,V), U/O about W (U,V)
    rot_check(8'h3B, 2, 0, 1);   // J
    rot_check(8'h4B, 2, 0, 0);   // L
    chk(vnear(cam_u, '{1.0, 0.0, 0.0}, 2e-3) && vnear(cam_w, '{0.0, 0.0, 1.0}, 2e-3),
        "J then L did not return the axes");
    rot_check(8'h43, 2, 1, 0);   // I
    rot_check(8'h42, 2, 1, 1);   // K
    rot_check(8'h3C, 0, 1, 0);   // U
    rot_check(8'h44, 0, 1, 1);   // O
    rot_check(8'h4B, 2, 0, 0);   // L
    rot_check(8'h43, 2, 1, 0);   // I
    begin
      v3 u, v, w;
      u = rv(cam_u); v = rv(cam_v); w = rv(cam_w);
      chk(dot(u, v) < 5e-3 && dot(u, v) > -5e-3 && dot(v, w) < 5e-3 && dot(v, w) > -5e-3 &&
          dot(u, u) > 0.99 && dot(w, w) > 0.99, "axes no longer orthonormal");
    end

    // a rotation while a frame is in flight waits for frame_done
    key(8'h1D, 1); key(8'h1D, 0);   // requests a frame, which is now busy
    repeat (3) @(negedge clk);
    chk(busy, "not busy");
    t0 = n_frames;
    key(8'h4B, 1);
    repeat (5) @(negedge clk);
    chk(n_frames == t0, "frame requested while one was in flight");
    done();
    repeat (3) @(negedge clk);
    chk(n_frames == t0 + 1, "deferred frame not requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
