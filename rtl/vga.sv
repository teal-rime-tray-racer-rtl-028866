// vga: 640x480 VGA timing generator.
//
// One pixel every CLK_DIV clocks (25 MHz pixels from a 50 MHz clock by default). The
// horizontal line is H_ACTIVE visible pixels, then front porch, sync pulse and back porch;
// the frame is V_ACTIVE visible lines with the same structure. hsync and vsync are active
// low. pix_en marks the clock in which a new pixel (x, y) is presented; blank_n is high in
// the visible area. fetch/fetch_x/fetch_y announce the next visible pixel one clock before
// its pix_en so that the frame buffer can read it from SRAM in that clock. frame_start
// pulses at the first pixel of a frame (start of vertical blanking is at y = V_ACTIVE).
// The standard 640x480 at 60 Hz numbers are used; the report only shows the relative
// timing of the periods.
module vga #(
  parameter int CLK_DIV  = 2,
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic       pix_en,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       blank_n,
  output logic       hsync,
  output logic       vsync,
  output logic       fetch,
  output logic [9:0] fetch_x,
  output logic [9:0] fetch_y,
  output logic       vblank_start
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [$clog2(CLK_DIV+1)-1:0] div;
  logic [9:0] nx, ny;

  always_comb begin
    nx = (x == 10'(H_TOTAL - 1)) ? '0 : x + 1'b1;
    ny = (x == 10'(H_TOTAL - 1)) ? ((y == 10'(V_TOTAL - 1)) ? '0 : y + 1'b1) : y;
  end

  assign pix_en  = (div == 0);
  assign blank_n = (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
  assign hsync   = !((x >= 10'(H_ACTIVE + H_FP)) && (x < 10'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync   = !((y >= 10'(V_ACTIVE + V_FP)) && (y < 10'(V_ACTIVE + V_FP + V_SYNC)));
  assign fetch   = (div == ($clog2(CLK_DIV+1))'(CLK_DIV - 1)) &&
                   (nx < 10'(H_ACTIVE)) && (ny < 10'(V_ACTIVE));
  assign fetch_x = nx;
  assign fetch_y = ny;
  assign vblank_start = pix_en && (x == 0) && (y == 10'(V_ACTIVE));

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
      x   <= '0;
      y   <= '0;
    end else begin
      div <= (div == ($clog2(CLK_DIV+1))'(CLK_DIV - 1)) ? '0 : div + 1'b1;
      if (div == ($clog2(CLK_DIV+1))'(CLK_DIV - 1)) begin
        x <= nx;
        y <= ny;
      end
    end
  end
endmodule
