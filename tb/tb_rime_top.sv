// tb_rime_top: end-to-end test of the whole ray tracer, with reduced sizes (8 clocks per
// serial bit, 64 rays in flight, small scene memories, camera speed scaled to a 1 MHz clock)
// and the real 640x480 VGA timing.
//
// The testbench plays the host PC and the user: it waits for the receiver's NAK, uploads
// the seeded test scene over the serial line with XMODEM (one block is first sent with a bad
// checksum, so the loader must roll back), and sends EOT. Loading the scene starts the first
// frame at the switch-selected level 3 (80x60). When the frame is done, the displayed SRAM
// buffer is compared pixel by pixel with a real-arithmetic trace of the scene, and during the
// next VGA frame every visible VGA pixel is compared with the SRAM word it must come from
// (each stored pixel covering an 8x8 block). It then holds W on the PS/2 keyboard for a few
// frames (the camera must move forward), releases it and presses L (a 45-degree turn).
// Every mechanism is counted and must occur at least once: XMODEM good and bad blocks,
// scene rollback, key events, camera moves and turns, frame starts and swaps, the ray-pipe
// events (scene miss, push, pop, restart, exit miss, leaf, triangle test, hit), SRAM writes
// and VGA reads.
module tb_rime_top;
  import rt_pkg::*;
  import tb_fp_pkg::*;
  import tb_scene_pkg::*;

  localparam int CPB = 8;
  localparam int LVL = 3;

  logic clk = 0, rst = 1;
  logic uart_rxd = 1, uart_txd, ps2_clk = 1, ps2_data = 1;
  logic [2:0] sw_level = 3'(LVL);
  logic scene_loaded, xmodem_done, rendering;
  logic [10:0] scache_raddr = '0;
  logic [159:0] scache_rdata;
  logic [19:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata;
  logic sram_we_n, sram_oe_n;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync, vga_blank_n;
  always #5 clk = ~clk;

  rime_top #(.CLK_HZ(1_000_000), .CLKS_PER_BIT(CPB), .NAK_PERIOD(200_000), .NUM_RAYS(64),
             .NODE_DEPTH(512), .LIST_DEPTH(1024), .TRI_DEPTH(64), .PB_DEPTH(4), .SS_DEPTH(2)) dut (
    .clk, .rst, .uart_rxd, .uart_txd, .ps2_clk, .ps2_data, .sw_level, .scene_loaded,
    .xmodem_done, .rendering, .scache_raddr(scache_raddr[5:0]), .scache_rdata, .sram_addr,
    .sram_wdata, .sram_rdata, .sram_we_n, .sram_oe_n, .vga_r, .vga_g, .vga_b, .vga_hsync,
    .vga_vsync, .vga_blank_n);

  sram_model u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
                     .we_n(sram_we_n), .oe_n(sram_oe_n));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("%s", msg); end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired: written %0d of %0d, rendering %b", dut.u_fb.written, dut.u_fb.total, rendering);
    foreach (mcount[i]) $display("%-15s %0d", mname[i], mcount[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  localparam int NM = 21;
  string mname [NM] = '{"xmodem good block", "xmodem bad block", "scene loaded",
    "key event", "camera move", "camera turn", "frame start", "buffer swap", "scene miss",
    "push", "pop", "restart", "exit miss", "leaf", "triangle test", "hit", "pixel written",
    "vga read", "xmodem done", "pixbuf full", "stack overflow"};
  int mcount [NM];
  initial foreach (mcount[i]) mcount[i] = 0;

  always @(posedge clk) if (!rst) begin
    mcount[0]  += int'(dut.block_good);
    mcount[1]  += int'(dut.block_bad);
    mcount[2]  += int'(scene_loaded && !dut.u_cam.loaded_q);
    mcount[3]  += int'(dut.key_valid);
    mcount[4]  += int'(dut.cam_moved);
    mcount[5]  += int'(dut.cam_rotated);
    mcount[6]  += int'(dut.frame_start);
    mcount[7]  += int'(dut.frame_done);
    mcount[8]  += int'(dut.ev_scene_miss);
    mcount[9]  += int'(dut.ev_push);
    mcount[10] += int'(dut.ev_pop);
    mcount[11] += int'(dut.ev_restart);
    mcount[12] += int'(dut.ev_exit_miss);
    mcount[13] += int'(dut.ev_leaf);
    mcount[14] += int'(dut.ev_tri_test);
    mcount[15] += int'(dut.ev_hit);
    mcount[16] += int'(!sram_we_n);
    mcount[17] += int'(!sram_oe_n);
    mcount[19] += int'(dut.pb_full);
    mcount[20] += int'(dut.u_raypipe.u_ss.ps_valid && dut.u_raypipe.u_ss.ps_push &&
                       dut.u_raypipe.u_ss.cnt_mem[dut.u_raypipe.u_ss.ps_id] == 2'd2);
  end

  // ---------------------------------------------------------------- serial host
  logic [7:0] reply_q[$];
  initial forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (CPB + CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      b[i] = uart_txd;
      repeat (CPB) @(posedge clk);
    end
    reply_q.push_back(b);
  end

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
  endtask

  task automatic get_reply(output logic [7:0] r);
    int n;
    n = 0;
    while (reply_q.size() == 0 && n < 100 * CPB) begin @(negedge clk); n++; end
    r = reply_q.size() ? reply_q.pop_front() : 8'h00;
  endtask

  task automatic upload(ref logic [7:0] file[$]);
    logic [7:0] r;
    int blk;
    wait (reply_q.size() > 0);
    get_reply(r);
    chk(r == 8'h15, "no NAK from the receiver");
    blk = 1;
    for (int first = 0; first < file.size(); first += 128) begin
      for (int attempt = 0; attempt < 2; attempt++) begin
        logic [7:0] sum;
        bit corrupt;
        corrupt = (attempt == 0 && blk == 3);
        sum = 0;
        send_byte(8'h01); send_byte(8'(blk)); send_byte(~8'(blk));
        for (int k = 0; k < 128; k++) begin
          logic [7:0] b;
          b = (first + k < file.size()) ? file[first + k] : 8'h1A;
          send_byte(b);
          sum += b;
        end
        send_byte(corrupt ? sum ^ 8'h5A : sum);
        get_reply(r);
        if (corrupt) begin
          chk(r == 8'h15, "bad block not NAKed");
        end else begin
          chk(r == 8'h06, $sformatf("block %0d not ACKed (%h)", blk, r));
          break;
        end
      end
      blk = (blk == 127) ? 1 : blk + 1;
    end
    send_byte(8'h04);
    get_reply(r);
    chk(r == 8'h06, "EOT not ACKed");
  endtask

  // ---------------------------------------------------------------- keyboard
  task automatic ps2_send(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (50) @(negedge clk);
      ps2_clk = 0;
      repeat (50) @(negedge clk);
      ps2_clk = 1;
    end
    repeat (200) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- image checks
  task automatic check_frame(real ez, output int bad, output int skipped);
    int w, h;
    w = 640 >> LVL; h = 480 >> LVL;
    bad = 0; skipped = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        real o[3], d[3];
        bit amb;
        int t;
        logic [15:0] exp_c, got_c;
        o[0] = 0.0; o[1] = 0.0; o[2] = ez;
        d[0] = (real'((2 * x + 1) << LVL) - 640.0) / 640.0;
        d[1] = (480.0 - real'((2 * y + 1) << LVL)) / 640.0;
        d[2] = 1.0;
        t = trace(o, d, amb);
        if (amb) begin skipped++; continue; end
        exp_c = (t < 0) ? 16'h0010 : tri_color(t);
        got_c = u_sram.peek({dut.u_fb.disp_buf, 19'(y * w + x)});
        checks++;
        if (got_c != exp_c) begin
          failures++; bad++;
          if (bad < 10) $display("pixel (%0d,%0d): got %h expected %h", x, y, got_c, exp_c);
        end
      end
  endtask

  // compare one whole VGA frame with the displayed buffer
  task automatic check_vga(output int bad);
    int n;
    bad = 0; n = 0;
    @(negedge clk);
    while (!(dut.u_vga.x == 0 && dut.u_vga.y == 0 && dut.vga_pix_en)) @(negedge clk);
    do begin
      if (dut.vga_pix_en && vga_blank_n) begin
        logic [15:0] c;
        int px, py;
        px = int'(dut.u_vga.x); py = int'(dut.u_vga.y);
        c = u_sram.peek({dut.u_fb.disp_buf, 19'((py >> LVL) * (640 >> LVL) + (px >> LVL))});
        n++;
        if (vga_r != {c[15:11], c[15:13]} || vga_g != {c[10:5], c[10:9]} ||
            vga_b != {c[4:0], c[4:2]}) begin
          bad++;
          if (bad < 5) $display("VGA (%0d,%0d) shows %h%h%h, buffer holds %h", px, py,
                                vga_r, vga_g, vga_b, c);
        end
      end
      @(negedge clk);
    end while (!(dut.u_vga.x == 0 && dut.u_vga.y == 0 && dut.vga_pix_en));
    checks++;
    if (bad != 0 || n != 640 * 480) begin
      failures++;
      $display("VGA frame: %0d pixels, %0d wrong", n, bad);
    end
  endtask

  task automatic wait_frame();
    @(negedge clk);
    while (!dut.frame_done) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [7:0] file[$];
    int bad, skipped;
    real z0;
    make_triangles(32'd7);
    build_tree();
    to_file(file);
    repeat (5) @(negedge clk);
    rst = 0;
    upload(file);
    chk(xmodem_done, "xmodem not done");
    mcount[18] = int'(xmodem_done);
    wait (scene_loaded);
    chk(1, "");
    $display("scene uploaded (%0d bytes) at cycle %0t", file.size(), $time / 10);

    wait_frame();
    check_frame(-10.0, bad, skipped);
    $display("frame 1 (level %0d): %0d wrong, %0d ambiguous pixels skipped", LVL, bad, skipped);
    check_vga(bad);

    // hold W: the camera moves forward along +Z, one step per finished frame
    z0 = to_real(dut.cam_e.z);
    ps2_send(8'h3E);                          // key 8: 2 units per second
    ps2_send(8'h1D);                          // W pressed
    wait_frame(); wait_frame(); wait_frame();
    ps2_send(8'hF0); ps2_send(8'h1D);         // W released
    wait_frame();
    chk(to_real(dut.cam_e.z) > z0 && dut.cam_e.x == 0 && dut.cam_e.y == 0,
        $sformatf("camera did not move forward: z %f -> %f", z0, to_real(dut.cam_e.z)));
    $display("camera moved from z=%f to z=%f", z0, to_real(dut.cam_e.z));

    ps2_send(8'h4B); ps2_send(8'hF0); ps2_send(8'h4B);   // L: turn right 45 degrees
    wait_frame();
    chk(close(to_real(dut.cam_w.x), 0.7071, 1e-3) && close(to_real(dut.cam_w.z), 0.7071, 1e-3),
        "camera forward vector after turn");

    foreach (mcount[i]) begin
      $display("%-15s %0d", mname[i], mcount[i]);
      chk(mcount[i] > 0, $sformatf("mechanism never seen: %s", mname[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
