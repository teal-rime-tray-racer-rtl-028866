// fb_handler: double-buffered 16-bit frame buffer in external SRAM.
//
// The SRAM (1M x 16) holds two frame buffers, at word 0 and at word 2^19. One is complete and
// shown on the screen, the other is being drawn. In a clock in which the VGA timing asks for
// the next visible pixel (vga_fetch), the handler reads that pixel from the displayed buffer
// and latches it (the SRAM read is asynchronous: data is valid in the same clock). In every
// other clock it writes one pixel from the pixel buffer into the buffer being drawn, so VGA
// reads always win and the pixel buffer absorbs the difference. The displayed image may have
// a lower resolution (level k: (640>>k) x (480>>k) pixels); each stored pixel is then shown
// as a 2^k x 2^k block. frame_start latches the drawing level and clears the pixel count;
// when all pixels of the frame have been written, the two buffers swap at the next start
// of vertical blanking and frame_done pulses. RGB565 is widened to 8 bits per channel by
// repeating the high bits. The two buffers, the swap after a complete frame, 16-bit colour
// and the SRAM sharing follow the report; the address map, the read-first scheduling and the
// swap at vertical blanking are this design's choices.
module fb_handler (
  input  logic        clk,
  input  logic        rst,
  // frame control
  input  logic        frame_start,
  input  logic [2:0]  draw_level,
  output logic        frame_done,
  output logic [2:0]  disp_level,
  output logic        disp_buf,
  // pixels to store
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [18:0] pix_addr,
  input  logic [15:0] pix_color,
  // VGA side
  input  logic        vga_fetch,
  input  logic [9:0]  vga_fetch_x,
  input  logic [9:0]  vga_fetch_y,
  input  logic        vga_vblank_start,
  input  logic        vga_blank_n,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  // SRAM
  output logic [19:0] sram_addr,
  output logic [15:0] sram_wdata,
  input  logic [15:0] sram_rdata,
  output logic        sram_we_n,
  output logic        sram_oe_n
);
  logic [2:0]  lvl;
  logic [18:0] written, total;
  logic        swap_pending;
  logic [15:0] shown;
  logic [18:0] rd_index;

  always_comb begin
    total    = 19'(19'd307200 >> (2 * lvl));
    rd_index = 19'((vga_fetch_y >> disp_level) * (10'd640 >> disp_level)
                   + (vga_fetch_x >> disp_level));
    pix_ready  = !vga_fetch;
    sram_we_n  = 1'b1;
    sram_oe_n  = 1'b1;
    sram_wdata = pix_color;
    sram_addr  = '0;
    if (vga_fetch) begin
      sram_oe_n = 1'b0;
      sram_addr = {disp_buf, rd_index};
    end else if (pix_valid) begin
      sram_we_n = 1'b0;
      sram_addr = {!disp_buf, pix_addr};
    end
  end

  assign vga_r = vga_blank_n ? {shown[15:11], shown[15:13]} : 8'd0;
  assign vga_g = vga_blank_n ? {shown[10:5], shown[10:9]}   : 8'd0;
  assign vga_b = vga_blank_n ? {shown[4:0], shown[4:2]}     : 8'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      lvl          <= '0;
      written      <= '0;
      swap_pending <= 1'b0;
      disp_buf     <= 1'b0;
      disp_level   <= '0;
      frame_done   <= 1'b0;
      shown        <= '0;
    end else begin
      frame_done <= 1'b0;
      if (vga_fetch) shown <= sram_rdata;
      if (frame_start) begin
        lvl     <= draw_level;
        written <= '0;
      end else if (pix_valid && pix_ready) begin
        written <= written + 1'b1;
        if (written + 1'b1 == total) swap_pending <= 1'b1;
      end
      if (swap_pending && vga_vblank_start) begin
        swap_pending <= 1'b0;
        disp_buf     <= !disp_buf;
        disp_level   <= lvl;
        frame_done   <= 1'b1;
      end
    end
  end
endmodule
