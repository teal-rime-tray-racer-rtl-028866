// tb_scene_loader: feeds a complete scene file (the seeded test scene: k-d nodes, lists,
// triangle transforms, shading records, bounding box) to the scene loader in 128-byte
// blocks, the way the XMODEM receiver delivers it, with a verdict pulse after each block.
// About one block in four is first delivered with corrupted bytes and judged bad, then
// resent. The memory writes are captured; at the end every stored node, list entry,
// triangle and shading record, and the bounding box, must equal the file's contents, and
// loaded must be set. Checks that loaded stays low until the last section is complete and
// that rollbacks happened.
module tb_scene_loader;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  import tb_scene_pkg::*;

  logic clk = 0, rst = 1;
  logic msg_valid = 0, block_good = 0, block_bad = 0;
  logic [7:0] msg_byte = '0;
  logic tc_we, lc_we, ic_we, sc_we, loaded;
  logic [15:0] wr_addr;
  logic [287:0] wr_data;
  vec3_t bbox_min, bbox_max;
  always #5 clk = ~clk;

  scene_loader dut (.*);

  int checks = 0, failures = 0, n_rollback = 0;
  logic [47:0]  got_node [int];
  logic [15:0]  got_list [int];
  logic [287:0] got_tri [int];
  logic [159:0] got_sh [int];
  logic [7:0] file[$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (tc_we) got_node[int'(wr_addr)] = wr_data[47:0];
    if (lc_we) got_list[int'(wr_addr)] = wr_data[15:0];
    if (ic_we) got_tri[int'(wr_addr)] = wr_data;
    if (sc_we) got_sh[int'(wr_addr)] = wr_data[159:0];
  end

  task automatic send_block(int first, bit bad);
    for (int k = 0; k < 128; k++) begin
      logic [7:0] b;
      b = (first + k < file.size()) ? file[first + k] : 8'h1A;
      if (bad && $urandom_range(0, 15) == 0) b = 8'($urandom);
      msg_valid = 1; msg_byte = b;
      @(negedge clk);
      msg_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    if (bad) block_bad = 1; else block_good = 1;
    @(negedge clk);
    block_bad = 0; block_good = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [287:0] w;
    make_triangles(11);
    build_tree();
    to_file(file);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int first = 0; first < file.size(); first += 128) begin
      if ($urandom_range(0, 3) == 0) begin
        send_block(first, 1);
        n_rollback++;
      end
      chk(!loaded || first + 128 >= file.size(), "loaded too early");
      send_block(first, 0);
    end
    chk(loaded, "loaded not set");
    chk(n_rollback > 0, "no rollback exercised");
    chk(got_node.num() == nodes.size() && got_list.num() == lists.size() &&
        got_tri.num() == NTRI && got_sh.num() == NTRI, "number of stored elements");
    foreach (nodes[j]) chk(got_node.exists(j) && got_node[j] == nodes[j], $sformatf("node %0d", j));
    foreach (lists[j]) chk(got_list.exists(j) && got_list[j] == lists[j], $sformatf("list %0d", j));
    for (int i = 0; i < NTRI; i++) begin
      chk(got_tri.exists(i) && got_tri[i] == tri_word(i), $sformatf("triangle %0d", i));
      w = {from_real(0.5), from_real(0.25 * (i % 4)), from_real(1.0),
           from_real(0.0), from_real(0.0), from_real(-1.0), 16'(i)};
      chk(got_sh.exists(i) && got_sh[i] == w[159:0], $sformatf("shading record %0d", i));
    end
    chk(bbox_min == {24'(f32(smin[0]) >> 8), 24'(f32(smin[1]) >> 8), 24'(f32(smin[2]) >> 8)} &&
        bbox_max == {24'(f32(smax[0]) >> 8), 24'(f32(smax[1]) >> 8), 24'(f32(smax[2]) >> 8)}, "bounding box");
    $display("%0d bytes, %0d nodes, %0d list entries, %0d rollbacks", file.size(),
             nodes.size(), lists.size(), n_rollback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
