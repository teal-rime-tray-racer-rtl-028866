// tb_shader: the shader with 16 ray IDs and a model of the ray pipe around it. 600 primary
// rays (random rays, sequential pixel indices) are offered; each dispatched ray is held by
// the model for a random time and returned through one of the four retire ports (scene
// miss, list-unit hit with a random triangle, short-stack miss, occluded shadow), several
// at once so the priority is exercised, and the pixel output stalls at random. Checks: the
// raystore write carries the dispatched ray and ID, no ID is handed out twice while in
// flight, in_flight never exceeds NUM_RAYS and equals the model's count, every pixel comes
// out exactly once with the colour for its outcome, and IDs run out (dispatch stalls).
module tb_shader;
  import rt_pkg::*;
  localparam int NR = 16, NPIX = 600;
  logic clk = 0, rst = 1;
  logic prim_valid = 0, prim_ready;
  ray_t prim_ray = '0;
  logic [18:0] prim_pix = '0;
  logic rs_we, disp_valid, disp_ready = 0, disp_shadow;
  logic [RAYID_W-1:0] rs_id, disp_id;
  ray_t rs_ray, disp_ray;
  logic sm_valid = 0, sm_ready, lh_valid = 0, lh_ready, ss_valid = 0, ss_ready, sh_valid = 0, sh_ready;
  logic [RAYID_W-1:0] sm_id = '0, ss_id = '0, sh_id = '0;
  ray_result_t lh_result = '0;
  logic pix_valid, pix_ready = 0;
  logic [18:0] pix_addr;
  logic [15:0] pix_color;
  logic [$clog2(NR+1)-1:0] in_flight;
  always #5 clk = ~clk;

  shader #(.NUM_RAYS(NR)) dut (.*);

  int checks = 0, failures = 0, n_pix = 0, n_full_stall = 0;
  int busy_pix [int];           // id -> pixel
  int expect_col [int];         // pixel -> colour
  bit got [int];
  int ports_used [4] = '{0, 0, 0, 0};
  typedef struct { int id; int port; int tri_n; int due; } ret_t;
  ret_t pend[$];
  int cyc = 0, n_acc = 0;
  bit port_free [4];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d pixels", n_pix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the pipe: sample everything at the clock edge, drive after it
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (prim_valid && !prim_ready && busy_pix.num() == NR) n_full_stall++;
    if (rs_we) begin
      chk(!busy_pix.exists(int'(rs_id)), $sformatf("ID %0d handed out twice", rs_id));
      chk(rs_ray == prim_ray, "raystore write data");
      busy_pix[int'(rs_id)] = int'(prim_pix);
      n_acc++;
    end
    if (disp_valid && disp_ready) begin
      ret_t r;
      chk(!disp_shadow && busy_pix.exists(int'(disp_id)), "dispatch of unknown ID");
      r.id = int'(disp_id); r.port = $urandom_range(0, 3); r.tri_n = $urandom_range(0, 999);
      r.due = cyc + $urandom_range(1, 30);
      pend.push_back(r);
    end
    // retirements accepted at this edge
    if (sm_valid && sm_ready) retire(int'(sm_id), -1, 0);
    if (lh_valid && lh_ready) retire(int'(lh_result.id), int'(lh_result.tri_id), 1);
    if (ss_valid && ss_ready) retire(int'(ss_id), -1, 2);
    if (sh_valid && sh_ready) retire(int'(sh_id), -1, 3);
    chk(int'(in_flight) <= NR, "in_flight above NUM_RAYS");
    if (pix_valid && pix_ready) begin
      chk(expect_col.exists(int'(pix_addr)) && !got.exists(int'(pix_addr)) &&
          expect_col[int'(pix_addr)] == int'(pix_color),
          $sformatf("pixel %0d colour %h", pix_addr, pix_color));
      got[int'(pix_addr)] = 1;
      n_pix++;
    end
    // present due returns, one per port, holding a port until it is taken
    if (!(sm_valid && !sm_ready)) sm_valid <= 0;
    if (!(lh_valid && !lh_ready)) lh_valid <= 0;
    if (!(ss_valid && !ss_ready)) ss_valid <= 0;
    if (!(sh_valid && !sh_ready)) sh_valid <= 0;
    port_free[0] = !(sm_valid && !sm_ready);
    port_free[1] = !(lh_valid && !lh_ready);
    port_free[2] = !(ss_valid && !ss_ready);
    port_free[3] = !(sh_valid && !sh_ready);
    for (int k = 0; k < pend.size(); k++) begin
      if (pend[k].due <= cyc) begin
        if (port_free[pend[k].port]) begin
          port_free[pend[k].port] = 0;
          case (pend[k].port)
            0: begin sm_valid <= 1; sm_id <= 9'(pend[k].id); end
            1: begin lh_valid <= 1; lh_result <= '0;
                     lh_result.id <= 9'(pend[k].id); lh_result.hit <= 1;
                     lh_result.tri_id <= 16'(pend[k].tri_n); end
            2: begin ss_valid <= 1; ss_id <= 9'(pend[k].id); end
            default: begin sh_valid <= 1; sh_id <= 9'(pend[k].id); end
          endcase
          pend[k].due = 1 << 30;   // presented
        end
      end
    end
    disp_ready <= $urandom_range(0, 3) != 0;
    pix_ready <= $urandom_range(0, 4) != 0;
  end

  task automatic retire(int id, int tri_n, int port);
    chk(busy_pix.exists(id), $sformatf("retire of idle ID %0d", id));
    if (busy_pix.exists(id)) begin
      expect_col[busy_pix[id]] = (tri_n >= 0) ? int'(16'((tri_n + 1) * 32'h3A95)) : 16'h0010;
      busy_pix.delete(id);
    end
    ports_used[port]++;
    for (int k = 0; k < pend.size(); k++)
      if (pend[k].id == id) begin pend.delete(k); break; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int p = 0; p < NPIX; p++) begin
      prim_valid = 1;
      prim_pix = 19'(p);
      for (int i = 0; i < 6; i++) prim_ray[i*24 +: 24] = 24'($urandom);
      @(negedge clk);
      while (n_acc != p + 1) @(negedge clk);
    end
    prim_valid = 0;
    wait (n_pix == NPIX);
    repeat (5) @(posedge clk);
    chk(in_flight == 0, "rays still in flight");
    chk(n_full_stall > 0, "dispatch never ran out of IDs");
    foreach (ports_used[k]) chk(ports_used[k] > 0, $sformatf("retire port %0d unused", k));
    $display("%0d pixels, out-of-ID stalls %0d, retires per port %0d %0d %0d %0d", n_pix,
             n_full_stall, ports_used[0], ports_used[1], ports_used[2], ports_used[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
