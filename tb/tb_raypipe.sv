// tb_raypipe: renders the generated test scene through the whole ray pipe and checks every
// pixel against a brute-force reference tracer in real arithmetic.
//
// The scene memories are written directly through the ray pipe's write ports. Two frames
// are rendered: level 3 (80x60 rays) from (0,0,-10) and level 5 (20x15 rays) from (0,0,-40),
// where the scene is small and many rays miss its box. The pixel output is stalled at random
// to exercise back-pressure. Every pixel must arrive exactly once with the reference colour
// (pixels whose reference answer is numerically ambiguous are skipped). Each mechanism of
// the pipe (scene-box miss, stack push, pop, restart, exit miss, leaf, triangle test, hit,
// output stall) must occur at least once.
module tb_raypipe;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  import tb_scene_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         start;
  logic [2:0]   res_level, level;
  vec3_t        cam_e, cam_u, cam_v, cam_w, bbox_min, bbox_max;
  logic         prg_active;
  logic         tc_we, lc_we, ic_we;
  logic [15:0]  wr_addr;
  logic [287:0] wr_data;
  logic         pix_valid, pix_ready;
  logic [18:0]  pix_addr;
  logic [15:0]  pix_color;
  logic ev_scene_miss, ev_push, ev_pop, ev_restart, ev_exit_miss, ev_leaf, ev_tri_test;
  logic ev_hit, ev_stall;

  raypipe #(.NUM_RAYS(64), .NODE_DEPTH(512), .LIST_DEPTH(1024), .TRI_DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  int n_ev[9];
  int cycles = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (!rst) begin
      n_ev[0] += int'(ev_scene_miss); n_ev[1] += int'(ev_push); n_ev[2] += int'(ev_pop);
      n_ev[3] += int'(ev_restart); n_ev[4] += int'(ev_exit_miss); n_ev[5] += int'(ev_leaf);
      n_ev[6] += int'(ev_tri_test); n_ev[7] += int'(ev_hit); n_ev[8] += int'(ev_stall);
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d pixels, in flight %0d, prg %0d", got.size(), dut.u_shader.in_flight, prg_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) pix_ready <= ($urandom_range(0, 3) != 0);

  bit got [int];
  logic [15:0] col [int];
  always @(posedge clk) begin
    if (pix_valid && pix_ready) begin
      if (got.exists(int'(pix_addr))) begin
        failures++;
        $display("pixel %0d delivered twice", pix_addr);
      end
      got[int'(pix_addr)] = 1;
      col[int'(pix_addr)] = pix_color;
    end
  end

  task automatic render(int lvl, real ez);
    int w, h, skipped, bad;
    w = 640 >> lvl; h = 480 >> lvl;
    got.delete(); col.delete();
    cam_e = '{x: FP_ZERO, y: FP_ZERO, z: from_real(ez)};
    res_level = 3'(lvl);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (got.size() == w * h);
    repeat (50) @(posedge clk);
    checks++;
    if (got.size() != w * h) begin failures++; $display("pixel count %0d", got.size()); end
    skipped = 0; bad = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        real o[3], d[3], sx, sy;
        bit amb;
        int t;
        logic [15:0] exp_c;
        sx = (real'((2 * x + 1) << lvl) - 640.0) / 640.0;
        sy = (480.0 - real'((2 * y + 1) << lvl)) / 640.0;
        o[0] = 0.0; o[1] = 0.0; o[2] = ez;
        d[0] = sx; d[1] = sy; d[2] = 1.0;
        t = trace(o, d, amb);
        if (amb) begin skipped++; continue; end
        exp_c = (t < 0) ? 16'h0010 : tri_color(t);
        checks++;
        if (!col.exists(y * w + x) || col[y * w + x] != exp_c) begin
          failures++; bad++;
          if (bad < 10) $display("level %0d pixel (%0d,%0d): got %h expected %h (tri %0d)",
                                 lvl, x, y, col[y * w + x], exp_c, t);
        end
      end
    $display("level %0d: %0d pixels, %0d skipped as ambiguous, %0d wrong", lvl, w * h,
             skipped, bad);
  endtask

  initial begin
    logic [7:0] f[$];
    start = 0; res_level = 0;
    tc_we = 0; lc_we = 0; ic_we = 0; wr_addr = 0; wr_data = 0;
    for (int k = 0; k < 9; k++) n_ev[k] = 0;
    make_triangles(32'd7);
    build_tree();
    $display("scene: %0d triangles, %0d nodes, %0d list entries", NTRI, nodes.size(),
             lists.size());
    cam_e = '0;
    cam_u = '{x: FP_ONE, y: FP_ZERO, z: FP_ZERO};
    cam_v = '{x: FP_ZERO, y: FP_ONE, z: FP_ZERO};
    cam_w = '{x: FP_ZERO, y: FP_ZERO, z: FP_ONE};
    bbox_min = '{x: from_real(smin[0]), y: from_real(smin[1]), z: from_real(smin[2])};
    bbox_max = '{x: from_real(smax[0]), y: from_real(smax[1]), z: from_real(smax[2])};
    repeat (5) @(posedge clk);
    rst <= 0;
    foreach (nodes[j]) begin
      @(posedge clk); tc_we <= 1; wr_addr <= 16'(j); wr_data <= 288'(nodes[j]);
    end
    @(posedge clk); tc_we <= 0;
    foreach (lists[j]) begin
      @(posedge clk); lc_we <= 1; wr_addr <= 16'(j); wr_data <= 288'(lists[j]);
    end
    @(posedge clk); lc_we <= 0;
    for (int i = 0; i < NTRI; i++) begin
      @(posedge clk); ic_we <= 1; wr_addr <= 16'(i); wr_data <= tri_word(i);
    end
    @(posedge clk); ic_we <= 0;
    repeat (100) @(posedge clk);   // ray ID queue fills

    render(3, -10.0);
    render(5, -40.0);

    begin
      string nm[9] = '{"scene miss", "push", "pop", "restart", "exit miss", "leaf",
                       "triangle test", "hit", "output stall"};
      for (int k = 0; k < 9; k++) begin
        checks++;
        $display("%s: %0d", nm[k], n_ev[k]);
        if (n_ev[k] == 0) begin failures++; $display("mechanism never seen: %s", nm[k]); end
      end
    end
    $display("cycles: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
