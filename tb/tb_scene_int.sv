// tb_scene_int: random rays against random scene boxes through the scene intersection unit,
// compared with a real-arithmetic slab test. Checks the miss flag (near-grazing rays, where
// the entry and exit distances are within 1e-3, are not judged), tmin/tmax within 1e-2
// relative for rays that enter, the shadow-ray clamp of tmax to 1, that tokens leave with
// node 0 and restart_search set, and order/count under random output stalls.
module tb_scene_int;
  import rt_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst = 1;
  vec3_t bbox_min = '0, bbox_max = '0;
  logic in_valid = 0, in_ready, in_shadow = 0, out_valid, out_ready = 0, out_miss;
  logic [RAYID_W-1:0] in_id = '0;
  ray_t in_ray = '0;
  ray_tok_t out_tok;
  always #5 clk = ~clk;

  scene_int dut (.*);

  typedef struct { int id; bit shadow; bit miss; bit amb; real tmin, tmax; } exp_t;
  exp_t q[$];
  exp_t cur;
  int n_in = 0;
  int checks = 0, failures = 0, n_out = 0, n_hit = 0;
  localparam int N = 3000;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  function automatic real q24(real r);
    return to_real(from_real(r));
  endfunction

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      q.push_back(cur);
      n_in++;
    end
    if (out_valid && out_ready) begin
      exp_t e;
      e = q.pop_front();
      n_out++;
      chk(int'(out_tok.id) == e.id && out_tok.shadow == e.shadow && out_tok.node == 0 &&
          out_tok.restart_search, "token fields");
      if (!e.amb) begin
        chk(out_miss == e.miss, $sformatf("miss %b expected %b (%f %f)", out_miss, e.miss,
                                          e.tmin, e.tmax));
        if (!e.miss) begin
          n_hit++;
          chk(close(to_real(out_tok.tmin), e.tmin, 1e-2) &&
              close(to_real(out_tok.tmax), e.tmax, 1e-2),
              $sformatf("tmin/tmax %f %f expected %f %f", to_real(out_tok.tmin),
                        to_real(out_tok.tmax), e.tmin, e.tmax));
        end
      end
    end
    out_ready <= $urandom_range(0, 3) != 0;
  end

  initial begin
    real lo[3], hi[3], o[3], d[3];
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      exp_t e;
      if (i % 100 == 0) begin
        for (int k = 0; k < 3; k++) begin
          lo[k] = q24($urandom_range(0, 4000) / 1000.0 - 4.0);
          hi[k] = q24(lo[k] + $urandom_range(100, 5000) / 1000.0);
        end
        bbox_min = {from_real(lo[0]), from_real(lo[1]), from_real(lo[2])};
        bbox_max = {from_real(hi[0]), from_real(hi[1]), from_real(hi[2])};
      end
      for (int k = 0; k < 3; k++) begin
        o[k] = q24($urandom_range(0, 20000) / 1000.0 - 10.0);
        // aim at a point near the box so that roughly half the rays enter
        d[k] = q24(lo[k] + (hi[k] - lo[k]) * ($urandom_range(0, 1600) / 1000.0 - 0.3) - o[k]);
        if (d[k] == 0.0) d[k] = 0.25;
      end
      e.id = $urandom_range(0, 511);
      e.shadow = $urandom_range(0, 3) == 0;
      e.tmin = 0.0;
      e.tmax = 1.0e30;
      for (int k = 0; k < 3; k++) begin
        real t1, t2;
        t1 = (lo[k] - o[k]) / d[k];
        t2 = (hi[k] - o[k]) / d[k];
        if (t1 > t2) begin real x; x = t1; t1 = t2; t2 = x; end
        if (t1 > e.tmin) e.tmin = t1;
        if (t2 < e.tmax) e.tmax = t2;
      end
      if (e.shadow && e.tmax > 1.0) e.tmax = 1.0;
      e.miss = e.tmax < e.tmin;
      e.amb = (e.tmax - e.tmin < 1e-3 * (1.0 + (e.tmax < 0 ? -e.tmax : e.tmax))) &&
              (e.tmin - e.tmax < 1e-3 * (1.0 + (e.tmax < 0 ? -e.tmax : e.tmax)));
      in_valid = 1;
      in_id = 9'(e.id); in_shadow = e.shadow;
      in_ray = {from_real(o[0]), from_real(o[1]), from_real(o[2]),
                 from_real(d[0]), from_real(d[1]), from_real(d[2])};
      cur = e;
      @(negedge clk);
      while (n_in != i + 1) @(negedge clk);
      in_valid = 0;
    end
    wait (n_out == N);
    chk(n_hit > N / 5 && n_hit < 4 * N / 5, $sformatf("%0d of %0d rays enter", n_hit, N));
    $display("%0d rays, %0d enter the box", N, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
