// tb_int_unit: random ray/triangle pairs through the intersection unit, compared with the
// same unit-triangle test done in real arithmetic. Triangles come from the seeded test
// scene; rays start near the camera and aim at points around each triangle, so about half
// hit. Checks hit (cases within 1e-3 of an edge are not judged), t/u/v within 1e-2 relative,
// the routing flags (do_list, do_next, do_shadow) for the leaf position and ray kind, the
// next list index / count, and that output order and count match input under random stalls.
module tb_int_unit;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  import tb_scene_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  leaf_tok_t in_tok = '0, next_tok;
  logic [TRIID_W-1:0] in_tri = '0, res_tri;
  tri_mat_t in_mat = '0;
  ray_t in_ray = '0;
  logic do_list, do_next, do_shadow, res_hit, res_last;
  logic [RAYID_W-1:0] res_id;
  fp24_t res_t, res_u, res_v;
  always #5 clk = ~clk;

  int_unit dut (.*);

  typedef struct {
    int id; int tri_n; bit shadow; int left; int lidx;
    bit hit; bit amb; real t, u, v;
  } exp_t;
  exp_t q[$];
  exp_t cur;
  int n_in = 0;
  int checks = 0, failures = 0, n_hits = 0, n_out = 0;
  localparam int N = 2000;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  function automatic exp_t make(output tri_mat_t mat, output ray_t ray);
    exp_t e;
    real m[3][3], c[3], o[3], d[3], p[3], oo[3], dd[3], a, b;
    e.tri_n = $urandom_range(0, NTRI - 1);
    transform(e.tri_n, m, c);
    mat = {from_real(m[0][0]), from_real(m[0][1]), from_real(m[0][2]),
           from_real(m[1][0]), from_real(m[1][1]), from_real(m[1][2]),
           from_real(m[2][0]), from_real(m[2][1]), from_real(m[2][2]),
           from_real(c[0]), from_real(c[1]), from_real(c[2])};
    a = $urandom_range(0, 1400) / 1000.0 - 0.2;
    b = $urandom_range(0, 1400) / 1000.0 - 0.2;
    for (int k = 0; k < 3; k++) begin
      o[k] = $urandom_range(0, 2000) / 1000.0 - 1.0 + ((k == 2) ? -10.0 : 0.0);
      p[k] = va[e.tri_n][k] + a * (vb[e.tri_n][k] - va[e.tri_n][k]) + b * (vc[e.tri_n][k] - va[e.tri_n][k]);
      d[k] = p[k] - o[k];
      o[k] = to_real(from_real(o[k]));
      d[k] = to_real(from_real(d[k]));
    end
    ray = {from_real(o[0]), from_real(o[1]), from_real(o[2]),
           from_real(d[0]), from_real(d[1]), from_real(d[2])};
    for (int r = 0; r < 3; r++) begin
      oo[r] = c[r]; dd[r] = 0;
      for (int k = 0; k < 3; k++) begin
        oo[r] += m[r][k] * o[k];
        dd[r] += m[r][k] * d[k];
      end
    end
    e.t = -oo[2] / dd[2];
    e.u = oo[0] + e.t * dd[0];
    e.v = oo[1] + e.t * dd[1];
    e.hit = e.t > 0 && e.u >= 0 && e.v >= 0 && e.u + e.v <= 1;
    e.amb = (e.u > -1e-3 && e.u < 1e-3) || (e.v > -1e-3 && e.v < 1e-3) ||
            (e.u + e.v > 1 - 1e-3 && e.u + e.v < 1 + 1e-3);
    e.id = $urandom_range(0, 511);
    e.shadow = $urandom_range(0, 3) == 0;
    e.left = $urandom_range(1, 4);
    e.lidx = $urandom_range(0, 60000);
    return e;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      q.push_back(cur);
      n_in++;
    end
    if (out_valid && out_ready) begin
      exp_t e;
      bit hit, sh;
      e = q.pop_front();
      n_out++;
      hit = e.amb ? res_hit : e.hit;
      sh = e.shadow && hit && to_real(res_t) < 1.0;
      chk(int'(res_id) == e.id && int'(res_tri) == e.tri_n && res_last == (e.left == 1),
          "id / triangle / last mismatch");
      chk(res_hit == hit, $sformatf("hit %b expected %b (u %f v %f t %f)", res_hit, e.hit, e.u, e.v, e.t));
      if (hit) begin
        n_hits++;
        chk(close(to_real(res_t), e.t, 1e-2) && close(to_real(res_u), e.u, 1e-2) &&
            close(to_real(res_v), e.v, 1e-2),
            $sformatf("t/u/v %f %f %f expected %f %f %f", to_real(res_t), to_real(res_u),
                      to_real(res_v), e.t, e.u, e.v));
      end
      chk(do_shadow == sh && do_list == (!sh && (hit || e.left == 1)) &&
          do_next == (!sh && e.left != 1), "routing flags");
      chk(int'(next_tok.lidx) == (e.lidx + 1) % 65536 && int'(next_tok.left) == e.left - 1 &&
          int'(next_tok.id) == e.id && next_tok.shadow == e.shadow, "next token");
    end
    out_ready <= $urandom_range(0, 3) != 0;
  end

  initial begin
    make_triangles(7);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      exp_t e;
      tri_mat_t mat;
      ray_t ray;
      e = make(mat, ray);
      in_valid = 1;
      in_tok = '{id: 9'(e.id), shadow: e.shadow, lidx: 16'(e.lidx), left: 6'(e.left)};
      in_tri = 16'(e.tri_n); in_mat = mat; in_ray = ray;
      cur = e;
      @(negedge clk);
      while (n_in != i + 1) @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    in_valid = 0;
    wait (n_out == N);
    chk(n_hits > N / 8 && n_hits < 3 * N / 4, $sformatf("%0d hits of %0d", n_hits, N));
    $display("%0d pairs, %0d hits", N, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
