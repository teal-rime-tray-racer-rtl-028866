// tb_list_unit: random leaves on eight ray IDs. Each leaf is initialised with a tmax, then
// gets a random number of triangle results (hit or not, random t, u, v, triangle ID), the
// last one flagged. A model keeps the closest hit per ray; on the last result the unit must
// report a finished hit (closest hit no farther than the leaf tmax, with its triangle, t, u,
// v and the hit point o + t d computed in real numbers) or a pop request at the leaf tmax.
// Results are driven one at a time, blocking at the falling edge; a second phase holds
// out_ready low and checks that res_ready drops while a result waits.
module tb_list_unit;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  localparam int NR = 8;

  logic clk = 0, rst = 1;
  logic init_valid = 0, res_valid = 0, res_hit = 0, res_last = 0, out_ready = 1;
  logic [RAYID_W-1:0] init_id = '0, res_id = '0, rs_addr;
  fp24_t init_tmax = '0, res_t = '0, res_u = '0, res_v = '0, out_pop_t;
  logic [TRIID_W-1:0] res_tri = '0;
  logic res_ready, out_valid, out_hit;
  ray_result_t out_result;
  ray_t rays[NR];
  ray_t rs_ray;
  assign rs_ray = rays[rs_addr[2:0]];
  always #5 clk = ~clk;

  list_unit #(.NUM_RAYS(512)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic bit near(real a, real b);
    real d = a - b;
    if (d < 0) d = -d;
    return d <= 0.01 + 0.002 * (b < 0 ? -b : b);
  endfunction

  function automatic fp24_t rq(int lo, int hi);
    return from_real(real'($urandom_range(lo, hi)) / 8.0 - real'(hi) / 16.0);
  endfunction

  bit   m_hit[NR];
  real  m_t[NR], m_u[NR], m_v[NR], m_tmax[NR];
  int   m_tri[NR];
  int   n_fin = 0, n_pop = 0;

  task automatic leaf(int id);
    int n;
    @(negedge clk);
    for (int c = 0; c < 6; c++) rays[id][c*24 +: 24] = rq(0, 64);
    init_valid = 1; init_id = RAYID_W'(id); init_tmax = from_real(real'($urandom_range(8, 80)) / 8.0);
    @(posedge clk);
    m_hit[id] = 0; m_tmax[id] = to_real(init_tmax);
    @(negedge clk); init_valid = 0;
    n = $urandom_range(1, 6);
    for (int k = 0; k < n; k++) begin
      res_valid = 1; res_id = RAYID_W'(id); res_last = (k == n - 1);
      res_hit = 1'($urandom); res_tri = TRIID_W'($urandom);
      res_t = from_real(real'($urandom_range(1, 100)) / 8.0);
      res_u = from_real(real'($urandom_range(0, 8)) / 8.0);
      res_v = from_real(real'($urandom_range(0, 8)) / 8.0);
      do @(posedge clk); while (!res_ready);
      if (res_hit && (!m_hit[id] || to_real(res_t) < m_t[id])) begin
        m_hit[id] = 1; m_t[id] = to_real(res_t); m_u[id] = to_real(res_u);
        m_v[id] = to_real(res_v); m_tri[id] = int'(res_tri);
      end
      @(negedge clk); res_valid = 0;
    end
    while (!out_valid) @(negedge clk);
    chk(out_result.id == RAYID_W'(id), "result for the wrong ray");
    if (m_hit[id] && m_t[id] <= m_tmax[id]) begin
      n_fin++;
      chk(out_hit, $sformatf("ray %0d: hit at %f in leaf up to %f not reported", id, m_t[id], m_tmax[id]));
      chk(int'(out_result.tri_id) == m_tri[id] && to_real(out_result.t) == m_t[id] &&
          to_real(out_result.u) == m_u[id] && to_real(out_result.v) == m_v[id], "closest hit data wrong");
      chk(near(to_real(out_result.point.x), to_real(rays[id].orig.x) + m_t[id] * to_real(rays[id].dir.x)) &&
          near(to_real(out_result.point.y), to_real(rays[id].orig.y) + m_t[id] * to_real(rays[id].dir.y)) &&
          near(to_real(out_result.point.z), to_real(rays[id].orig.z) + m_t[id] * to_real(rays[id].dir.z)),
          "hit point wrong");
    end else begin
      n_pop++;
      chk(!out_hit, $sformatf("ray %0d: leaf miss reported as hit", id));
      chk(to_real(out_pop_t) == m_tmax[id], "pop t is not the leaf tmax");
    end
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    foreach (rays[i]) rays[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int k = 0; k < 1500; k++) leaf($urandom_range(0, NR - 1));
    // stall: a waiting result blocks the next one
    out_ready = 0;
    @(negedge clk);
    init_valid = 1; init_id = 3; init_tmax = from_real(10.0);
    @(posedge clk); @(negedge clk); init_valid = 0;
    res_valid = 1; res_id = 3; res_last = 1; res_hit = 0;
    @(posedge clk); @(negedge clk);
    chk(out_valid, "no result");
    repeat (3) begin @(posedge clk); chk(!res_ready, "result accepted while output full"); end
    @(negedge clk); out_ready = 1;
    @(posedge clk); @(negedge clk); res_valid = 0;
    $display("finished hits %0d, pops %0d", n_fin, n_pop);
    chk(n_fin > 100 && n_pop > 100, "both exits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
