// tb_shortstack: random pushes, restart-node writes, pops and inits on eight ray IDs,
// checked against a queue model of the short stack.
//
// The model keeps, per ray, a queue of at most DEPTH entries (a push onto a full queue drops
// the oldest), the restart node and whether one was recorded, the shadow flag and the scene
// exit time. A pop must return the newest entry; with an empty stack it must restart at the
// restart node over [t, scene tmax], or report a miss when t has reached scene tmax. One
// request is driven at a time (blocking at the falling edge) and each pop result is taken
// with out_ready high. A second phase holds out_ready low and checks that pops stall while
// the output register is full. Times are small positive floats, so their order is known.
module tb_shortstack;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  localparam int NR = 8, D = 4;

  logic clk = 0, rst = 1;
  logic ps_valid = 0, ps_push = 0, ps_restart = 0, ps_ready;
  logic [RAYID_W-1:0] ps_id = '0, pt_id = '0, pl_id = '0, in_id = '0;
  logic [NODEID_W-1:0] ps_node = '0, ps_restart_node = '0;
  fp24_t ps_tmin = '0, ps_tmax = '0, pt_t = '0, pl_t = '0, in_scene_tmax = '0;
  logic pt_valid = 0, pt_ready, pl_valid = 0, pl_ready, in_valid = 0, in_ready, in_shadow = 0;
  logic out_valid, out_ready = 1, out_miss, out_restart;
  ray_tok_t out_tok;
  always #5 clk = ~clk;

  shortstack #(.NUM_RAYS(512), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [NODEID_W-1:0] node; fp24_t tmin, tmax; } ent_t;
  ent_t st[NR][$];
  logic [NODEID_W-1:0] m_rnode[NR];
  bit m_have[NR], m_shadow[NR];
  fp24_t m_stmax[NR];
  int n_pop = 0, n_restart = 0, n_miss = 0, n_drop = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic fp24_t rt(int lo, int hi);
    return from_real(real'($urandom_range(lo, hi)) / 4.0);
  endfunction

  task automatic do_init(int id);
    @(negedge clk);
    in_valid = 1; in_id = RAYID_W'(id); in_shadow = 1'($urandom); in_scene_tmax = rt(20, 40);
    do @(posedge clk); while (!in_ready);
    m_shadow[id] = in_shadow; m_stmax[id] = in_scene_tmax; m_have[id] = 0; m_rnode[id] = '0;
    st[id].delete();
    @(negedge clk); in_valid = 0;
  endtask

  task automatic do_push(int id);
    ent_t e;
    @(negedge clk);
    ps_valid = 1; ps_id = RAYID_W'(id); ps_push = 1'($urandom); ps_restart = ($urandom_range(0, 3) == 0);
    if (!ps_push && !ps_restart) ps_push = 1;
    ps_node = NODEID_W'($urandom); ps_tmin = rt(0, 10); ps_tmax = rt(10, 30);
    ps_restart_node = NODEID_W'($urandom);
    @(posedge clk);
    chk(ps_ready, "push port not ready");
    if (ps_push) begin
      e.node = ps_node; e.tmin = ps_tmin; e.tmax = ps_tmax;
      if (st[id].size() == D) begin void'(st[id].pop_front()); n_drop++; end
      st[id].push_back(e);
    end
    if (ps_restart) begin m_rnode[id] = ps_restart_node; m_have[id] = 1; end
    @(negedge clk); ps_valid = 0; ps_push = 0; ps_restart = 0;
  endtask

  task automatic do_pop(int id, bit from_list);
    fp24_t t;
    ent_t e;
    t = rt(0, 45);
    @(negedge clk);
    if (from_list) begin pl_valid = 1; pl_id = RAYID_W'(id); pl_t = t; end
    else begin pt_valid = 1; pt_id = RAYID_W'(id); pt_t = t; end
    do @(posedge clk); while (!(from_list ? pl_ready : pt_ready));
    @(negedge clk); pl_valid = 0; pt_valid = 0;
    while (!out_valid) @(negedge clk);
    chk(out_tok.id == RAYID_W'(id), "result for the wrong ray");
    chk(out_tok.shadow == m_shadow[id], "shadow flag lost");
    chk(out_tok.restart_search == !m_have[id], "restart-search bit wrong");
    if (st[id].size() > 0) begin
      e = st[id].pop_back();
      n_pop++;
      chk(!out_miss && !out_restart, "pop reported as miss/restart");
      chk(out_tok.node == e.node && out_tok.tmin == e.tmin && out_tok.tmax == e.tmax,
          $sformatf("ray %0d popped node %0d, expected %0d", id, out_tok.node, e.node));
    end else if (to_real(t) >= to_real(m_stmax[id])) begin
      n_miss++;
      chk(out_miss && !out_restart, $sformatf("ray %0d: expected a miss", id));
    end else begin
      n_restart++;
      chk(!out_miss && out_restart, $sformatf("ray %0d: expected a restart", id));
      chk(out_tok.node == m_rnode[id] && out_tok.tmin == t && out_tok.tmax == m_stmax[id],
          "restart token wrong");
    end
    @(posedge clk);  // out_ready is high: the result leaves
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < NR; i++) do_init(i);
    for (int k = 0; k < 3000; k++) begin
      int id, op;
      id = $urandom_range(0, NR - 1);
      op = $urandom_range(0, 9);
      if (op == 0) do_init(id);
      else if (op < 6) do_push(id);
      else do_pop(id, op >= 8);
    end
    // output register full: a pop must wait
    out_ready = 0;
    do_push(1);
    @(negedge clk); pt_valid = 1; pt_id = 1; pt_t = rt(0, 5);
    @(posedge clk); @(negedge clk); pt_valid = 0;
    chk(out_valid, "first pop produced no result");
    pl_valid = 1; pl_id = 2; pl_t = rt(0, 5);
    repeat (3) begin @(posedge clk); chk(!pl_ready, "pop accepted while the output is full"); end
    @(negedge clk); out_ready = 1;
    @(posedge clk); @(negedge clk);
    chk(pl_ready, "pop not accepted after the output drained");
    pl_valid = 0;
    $display("pops %0d restarts %0d misses %0d dropped %0d", n_pop, n_restart, n_miss, n_drop);
    chk(n_pop > 0 && n_restart > 0 && n_miss > 0 && n_drop > 0, "a case was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
