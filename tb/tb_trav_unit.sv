// tb_trav_unit: random k-d tree nodes and rays against a model computed in real numbers.
//
// Origins and split planes are multiples of 1/4 and direction components are +-1/2, +-1 or
// +-2, so the plane crossing tmid = (split - o) / d is exact and the model's decisions match
// the float unit bit for bit. For every interior node the model picks the near child (the
// origin's side of the plane), decides which children the interval [tmin, tmax] crosses,
// and from that the expected destinations: next child, push of the far child, restart-node
// write, pop request or leaf. Leaves are checked for the list token. One token is driven at
// a time (blocking at the falling edge); a final burst with out_ready held high checks that
// the unit accepts and delivers one token per clock.
module tb_trav_unit;
  import rt_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, out_ready = 1, in_ready, out_valid;
  ray_tok_t in_tok = '0, next_tok;
  logic [47:0] in_node = '0;
  logic [RAYID_W-1:0] rs_addr;
  ray_t ray = '0, rs_ray;
  logic do_next, do_push, do_restart, do_pop, do_leaf;
  logic [NODEID_W-1:0] push_node, restart_node;
  fp24_t push_tmin, push_tmax, pop_t, leaf_tmax;
  leaf_tok_t leaf_tok;
  assign rs_ray = ray;
  always #5 clk = ~clk;

  trav_unit dut (.*);

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

  function automatic real rdir();
    real m[3] = '{0.5, 1.0, 2.0};
    return ($urandom_range(0, 1) ? -1.0 : 1.0) * m[$urandom_range(0, 2)];
  endfunction

  int n_case[6];  // leaf, empty leaf, near only, far only, both, pop on empty child

  task automatic one();
    int axis, node, right;
    bit lempty, rempty, leafn, rs;
    real o[3], d[3], split, tmin, tmax, tmid;
    bit below, e_next, e_push, e_restart, e_pop, e_leaf, e_rs, fe, se;
    int first, second, e_node;
    real e_tmin, e_tmax;
    for (int c = 0; c < 3; c++) begin
      o[c] = real'($urandom_range(0, 64)) / 4.0 - 8.0;
      d[c] = rdir();
      ray.orig[(2-c)*24 +: 24] = from_real(o[c]);
      ray.dir[(2-c)*24 +: 24]  = from_real(d[c]);
    end
    axis = $urandom_range(0, 2);
    node = $urandom_range(0, 30000); right = $urandom_range(0, 65535);
    lempty = ($urandom_range(0, 5) == 0); rempty = ($urandom_range(0, 5) == 0);
    leafn = ($urandom_range(0, 5) == 0);
    split = real'($urandom_range(0, 64)) / 4.0 - 8.0;
    tmin = real'($urandom_range(0, 16)) / 4.0;
    tmax = tmin + real'($urandom_range(0, 32)) / 4.0;
    rs = 1'($urandom);
    in_tok = '0;
    in_tok.id = RAYID_W'($urandom); in_tok.shadow = 1'($urandom); in_tok.restart_search = rs;
    in_tok.node = NODEID_W'(node); in_tok.tmin = from_real(tmin); in_tok.tmax = from_real(tmax);
    if (leafn) in_node = {2'b11, 6'($urandom_range(0, 63)), 16'($urandom), 24'd0};
    else in_node = {2'(axis), lempty, rempty, from_real(split), 16'(right), 4'd0};

    e_next = 0; e_push = 0; e_restart = 0; e_pop = 0; e_leaf = 0; e_rs = rs;
    e_node = node; e_tmin = tmin; e_tmax = tmax;
    tmid = (split - o[axis]) / d[axis];
    below = (o[axis] < split) || (o[axis] == split && d[axis] <= 0.0);
    first  = below ? (node + 1) % 65536 : right;
    second = below ? right : (node + 1) % 65536;
    fe = below ? lempty : rempty;
    se = below ? rempty : lempty;
    if (leafn) begin
      if (in_node[45:40] == 0) begin e_pop = 1; n_case[1]++; end
      else begin e_leaf = 1; n_case[0]++; end
    end else if (tmax <= tmid || tmid <= 0.0) begin
      n_case[2]++;
      if (fe) begin e_pop = 1; n_case[5]++; end else begin e_next = 1; e_node = first; end
    end else if (tmid <= tmin) begin
      n_case[3]++;
      if (se) begin e_pop = 1; n_case[5]++; end else begin e_next = 1; e_node = second; end
    end else begin
      n_case[4]++;
      if (rs && !(fe && se)) begin e_restart = 1; e_rs = 0; end
      if (fe && se) e_pop = 1;
      else if (fe) begin e_next = 1; e_node = second; e_tmin = tmid; end
      else begin e_next = 1; e_node = first; e_tmax = tmid; e_push = !se; end
    end

    @(negedge clk);
    in_valid = 1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
    chk(out_valid, "no result one clock after the token");
    chk({do_next, do_push, do_restart, do_pop, do_leaf} == {e_next, e_push, e_restart, e_pop, e_leaf},
        $sformatf("destinations %b, expected %b (leaf %0d axis %0d o %f d %f split %f t [%f,%f])",
          {do_next, do_push, do_restart, do_pop, do_leaf}, {e_next, e_push, e_restart, e_pop, e_leaf},
          leafn, axis, o[axis], d[axis], split, tmin, tmax));
    if (e_next) chk(next_tok.node == NODEID_W'(e_node) && to_real(next_tok.tmin) == e_tmin &&
                    to_real(next_tok.tmax) == e_tmax && next_tok.restart_search == e_rs &&
                    next_tok.id == in_tok.id && next_tok.shadow == in_tok.shadow, "next token wrong");
    if (e_push) chk(push_node == NODEID_W'(second) && to_real(push_tmin) == tmid &&
                    to_real(push_tmax) == tmax, "pushed entry wrong");
    if (e_restart) chk(restart_node == NODEID_W'(node), "restart node wrong");
    if (e_pop) chk(to_real(pop_t) == tmax, "pop t wrong");
    if (e_leaf) chk(leaf_tok.id == in_tok.id && leaf_tok.lidx == in_node[39:24] &&
                    leaf_tok.left == in_node[45:40] && to_real(leaf_tmax) == tmax, "leaf token wrong");
  endtask

  initial begin
    int n_out;
    foreach (n_case[i]) n_case[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int k = 0; k < 4000; k++) one();
    $display("leaf %0d empty leaf %0d near %0d far %0d both %0d empty child %0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_case[4], n_case[5]);
    foreach (n_case[i]) chk(n_case[i] > 0, "a traversal case was never exercised");
    // throughput: one token per clock with out_ready high
    n_out = 0;
    @(negedge clk); in_valid = 1;
    for (int k = 0; k < 50; k++) begin
      @(posedge clk);
      chk(in_ready, "token refused with out_ready high");
      if (k > 0) n_out += int'(out_valid);
    end
    @(negedge clk); in_valid = 0;
    chk(n_out == 49, $sformatf("burst delivered %0d of 49", n_out));
    // stall: out_ready low holds the result and refuses input
    out_ready = 0; in_valid = 1;
    @(posedge clk); @(negedge clk);
    chk(out_valid && !in_ready, "stall not propagated");
    out_ready = 1; in_valid = 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
