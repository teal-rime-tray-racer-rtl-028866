// tb_fb_handler: the frame-buffer handler with the real VGA timing generator and the SRAM
// model. Two frames are drawn (level 2, 160x120, random colours, pixels offered in random
// order with random gaps). Checks: each pixel lands in the hidden buffer at its address,
// nothing is written while VGA reads, frame_done pulses once per frame and only at the start
// of vertical blanking after the last pixel, the buffers swap, and a whole VGA frame after
// each swap shows the new image (every visible pixel equals the RGB888 widening of the SRAM
// word of its 4x4 block).
module tb_fb_handler;
  localparam int LVL = 2, W = 640 >> LVL, H = 480 >> LVL;
  logic clk = 0, rst = 1;
  logic frame_start = 0, frame_done, disp_buf;
  logic [2:0] draw_level = 3'(LVL), disp_level;
  logic pix_valid = 0, pix_ready;
  logic [18:0] pix_addr = '0;
  logic [15:0] pix_color = '0;
  logic pix_en, blank_n, hsync, vsync, fetch, vblank_start;
  logic [9:0] x, y, fetch_x, fetch_y;
  logic [7:0] vga_r, vga_g, vga_b;
  logic [19:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata;
  logic sram_we_n, sram_oe_n;
  always #5 clk = ~clk;

  vga u_vga (.*);
  fb_handler dut (.clk, .rst, .frame_start, .draw_level, .frame_done, .disp_level, .disp_buf,
    .pix_valid, .pix_ready, .pix_addr, .pix_color, .vga_fetch(fetch), .vga_fetch_x(fetch_x),
    .vga_fetch_y(fetch_y), .vga_vblank_start(vblank_start), .vga_blank_n(blank_n), .vga_r,
    .vga_g, .vga_b, .sram_addr, .sram_wdata, .sram_rdata, .sram_we_n, .sram_oe_n);
  sram_model u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
                     .we_n(sram_we_n), .oe_n(sram_oe_n));

  int checks = 0, failures = 0, n_acc = 0, n_done = 0;
  logic [15:0] img [W * H];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (!sram_we_n) begin
      checks++;
      if (!sram_oe_n || fetch || sram_addr != {!disp_buf, pix_addr} || sram_wdata != pix_color) begin
        failures++; $display("bad SRAM write");
      end
    end
    if (pix_valid && pix_ready) n_acc++;
    if (frame_done) begin
      n_done++;
      chk(n_acc == W * H && u_vga.y == 480 && u_vga.x == 0, "frame_done timing");
    end
  end

  task automatic draw();
    int order [W * H];
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (img[i]) img[i] = 16'($urandom);
    n_acc = 0;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    foreach (order[i]) begin
      pix_valid = 1; pix_addr = 19'(order[i]); pix_color = img[order[i]];
      @(negedge clk);
      while (n_acc != i + 1) @(negedge clk);
      pix_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  task automatic check_vga();
    int bad, n;
    bad = 0; n = 0;
    @(negedge clk);
    while (!(x == 0 && y == 0 && pix_en)) @(negedge clk);
    do begin
      if (pix_en && blank_n) begin
        logic [15:0] c;
        c = img[(int'(y) >> LVL) * W + (int'(x) >> LVL)];
        n++;
        if (vga_r != {c[15:11], c[15:13]} || vga_g != {c[10:5], c[10:9]} ||
            vga_b != {c[4:0], c[4:2]}) bad++;
      end
      @(negedge clk);
    end while (!(x == 0 && y == 0 && pix_en));
    chk(bad == 0 && n == 640 * 480, $sformatf("VGA frame: %0d of %0d pixels wrong", bad, n));
  endtask

  initial begin
    logic b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++) begin
      b0 = disp_buf;
      draw();
      wait (n_done == f + 1);
      chk(disp_buf == !b0 && disp_level == 3'(LVL), "buffers did not swap");
      for (int i = 0; i < W * H; i++)
        if (u_sram.peek({disp_buf, 19'(i)}) != img[i]) begin
          chk(0, $sformatf("SRAM pixel %0d", i)); break;
        end
      check_vga();
    end
    chk(n_done == 2, "frame_done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
