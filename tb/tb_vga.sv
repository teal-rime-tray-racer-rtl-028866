// tb_vga: runs the VGA timing generator at full 640x480 size for two frames and counts, per
// line and per frame, the visible pixels, hsync and vsync lengths and front porches; checks
// that fetch comes exactly one clock before each visible pixel with the matching position,
// and that vblank_start pulses once per frame at the first non-visible line.
module tb_vga;
  logic clk = 0, rst = 1;
  logic pix_en, blank_n, hsync, vsync, fetch, vblank_start;
  logic [9:0] x, y, fetch_x, fetch_y;
  always #5 clk = ~clk;

  vga dut (.*);

  int checks = 0, failures = 0;
  int vis = 0, hs = 0, lines_vs = 0, n_vbl = 0, n_fetch = 0;
  logic fetch_d = 0;
  logic [9:0] fx_d = '0, fy_d = '0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    fetch_d <= fetch;
    fx_d <= fetch_x;
    fy_d <= fetch_y;
    if (fetch) n_fetch++;
    if (fetch_d) chk(pix_en && blank_n && x == fx_d && y == fy_d, "fetch not followed by pixel");
    if (pix_en) begin
      if (blank_n) vis++;
      if (!hsync) hs++;
      if (x == 799) begin
        if (y < 480) chk(vis == 640, $sformatf("line %0d: %0d visible", y, vis));
        else chk(vis == 0, "visible pixel in blanking");
        chk(hs == 96, $sformatf("hsync %0d pixels", hs));
        if (!vsync) lines_vs++;
        vis = 0; hs = 0;
        if (y == 524) begin
          chk(lines_vs == 2, $sformatf("vsync %0d lines", lines_vs));
          lines_vs = 0;
        end
      end
      if (x == 656) chk(!hsync, "hsync not starting at 656");
      if (x == 655) chk(hsync, "hsync early");
      if (x == 0 && y == 490) chk(!vsync, "vsync not starting at line 490");
    end
    if (vblank_start) begin
      n_vbl++;
      chk(x == 0 && y == 480, "vblank_start position");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2 * 800 * 525 * 2) @(posedge clk);
    chk(n_vbl == 2, $sformatf("%0d vblank pulses", n_vbl));
    // the fetch for the very first pixel falls in reset
    chk(n_fetch == 2 * 640 * 480 - 1, $sformatf("%0d fetches", n_fetch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
