// tb_prg: primary ray generator at levels 5, 4 and 2 with a tilted, shifted camera and random
// output stalls (plus a stretch with ready held high to check one ray per clock). For every
// ray: the origin must be E and the direction W + sx*U + sy*V for its pixel (within 1e-3
// relative), each pixel index must occur exactly once, the packets must be 20x15 blocks in
// raster order, and done must pulse once after the last ray.
module tb_prg;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [2:0] res_level = '0, level;
  vec3_t cam_e = '0, cam_u = '0, cam_v = '0, cam_w = '0;
  logic out_valid, out_ready = 0, active, done;
  ray_t out_ray;
  logic [18:0] out_pix;
  always #5 clk = ~clk;

  prg dut (.*);

  int checks = 0, failures = 0, n_rays = 0, n_done = 0, burst = 0, max_burst = 0;
  bit seen [int];
  real E[3], U[3], V[3], W[3];
  int lvl_now = 0;
  bit free_run = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (done) n_done++;
    if (out_valid && out_ready) begin
      int w, x, y, p, exp_p;
      real sx, sy, d;
      w = 640 >> lvl_now;
      p = int'(out_pix); x = p % w; y = p / w;
      // packet order: n-th ray of the frame
      exp_p = ((n_rays / 300) / (w / 20)) * 15 * w + ((n_rays / 300) % (w / 20)) * 20 +
              ((n_rays % 300) / 20) * w + (n_rays % 20);
      chk(p == exp_p, $sformatf("ray %0d has pixel %0d, expected %0d", n_rays, p, exp_p));
      chk(!seen.exists(p), "pixel twice");
      seen[p] = 1;
      sx = (real'((2 * x + 1) << lvl_now) - 640.0) / 640.0;
      sy = (480.0 - real'((2 * y + 1) << lvl_now)) / 640.0;
      chk(to_real(out_ray.orig.x) == E[0] && to_real(out_ray.orig.y) == E[1] &&
          to_real(out_ray.orig.z) == E[2], "origin");
      d = W[0] + sx * U[0] + sy * V[0];
      chk(close(to_real(out_ray.dir.x), d, 1e-3), $sformatf("dir.x %f expected %f", to_real(out_ray.dir.x), d));
      d = W[1] + sx * U[1] + sy * V[1];
      chk(close(to_real(out_ray.dir.y), d, 1e-3), "dir.y");
      d = W[2] + sx * U[2] + sy * V[2];
      chk(close(to_real(out_ray.dir.z), d, 1e-3), "dir.z");
      n_rays++;
      burst++;
      if (burst > max_burst) max_burst = burst;
    end else burst = 0;
    out_ready <= free_run || ($urandom_range(0, 3) != 0);
  end

  task automatic frame(int lvl);
    int w, h;
    w = 640 >> lvl; h = 480 >> lvl;
    seen.delete(); n_rays = 0; n_done = 0; lvl_now = lvl;
    @(negedge clk); res_level = 3'(lvl); start = 1;
    @(negedge clk); start = 0;
    wait (n_done == 1);
    repeat (10) @(negedge clk);
    chk(n_rays == w * h && seen.num() == w * h, $sformatf("level %0d: %0d rays", lvl, n_rays));
    chk(n_done == 1 && !active, "done / active");
  endtask

  initial begin
    real c, s;
    c = 0.8; s = 0.6;
    E = '{1.5, -2.0, -8.0};
    U = '{c, 0.0, -s}; V = '{0.0, 1.0, 0.0}; W = '{s, 0.0, c};
    cam_e = {from_real(E[0]), from_real(E[1]), from_real(E[2])};
    cam_u = {from_real(U[0]), from_real(U[1]), from_real(U[2])};
    cam_v = {from_real(V[0]), from_real(V[1]), from_real(V[2])};
    cam_w = {from_real(W[0]), from_real(W[1]), from_real(W[2])};
    for (int k = 0; k < 3; k++) begin
      E[k] = to_real(from_real(E[k])); U[k] = to_real(from_real(U[k]));
      V[k] = to_real(from_real(V[k])); W[k] = to_real(from_real(W[k]));
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    frame(5);
    frame(4);
    free_run = 1;
    frame(2);
    chk(max_burst >= 1000, $sformatf("longest run of back-to-back rays %0d", max_burst));
    $display("longest back-to-back run %0d rays", max_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
