// rime_top: real-time ray tracer for a triangle scene held on chip.
//
// A host sends a scene file (k-d tree, triangle lists, unit-triangle transforms, colours and
// the scene bounding box) over the serial port with XMODEM; the scene loader stores it in the
// on-chip scene memories. A PS/2 keyboard moves and turns the camera; every camera change
// renders a new frame: the primary ray generator sends one ray per pixel into the ray pipe,
// which walks the k-d tree with a per-ray short stack, intersects the triangles of each leaf
// and colours the pixel. Finished pixels pass through the pixel buffer into the frame buffer
// being drawn in external SRAM; the frame buffer handler shows the completed buffer on VGA
// and swaps the two when a frame is complete, which lets the camera start the next frame.
// sw_level (board switches) selects the resolution level 0..5 for the next frame.
// scache holds the per-triangle colour and normal records; the shader used here colours by
// triangle ID and does not read them, so its read port is brought out (scache_raddr/rdata).
// All blocks share one clock (50 MHz by default); rst is synchronous and active high.
module rime_top
  import rt_pkg::*;
#(
  parameter int CLK_HZ       = 50_000_000,
  parameter int CLKS_PER_BIT = 434,
  parameter int NAK_PERIOD   = 50_000_000,
  parameter int NUM_RAYS     = 512,
  parameter int NODE_DEPTH   = 2048,
  parameter int LIST_DEPTH   = 4096,
  parameter int TRI_DEPTH    = 2048,
  parameter int SS_DEPTH     = 4,
  parameter int PB_DEPTH     = 256
) (
  input  logic         clk,
  input  logic         rst,
  // serial port
  input  logic         uart_rxd,
  output logic         uart_txd,
  // PS/2 keyboard
  input  logic         ps2_clk,
  input  logic         ps2_data,
  // board switches and status
  input  logic [2:0]   sw_level,
  output logic         scene_loaded,
  output logic         xmodem_done,
  output logic         rendering,
  // per-triangle colour/normal memory read port
  input  logic [$clog2(TRI_DEPTH)-1:0] scache_raddr,
  output logic [159:0] scache_rdata,
  // SRAM
  output logic [19:0]  sram_addr,
  output logic [15:0]  sram_wdata,
  input  logic [15:0]  sram_rdata,
  output logic         sram_we_n,
  output logic         sram_oe_n,
  // VGA
  output logic [7:0]   vga_r,
  output logic [7:0]   vga_g,
  output logic [7:0]   vga_b,
  output logic         vga_hsync,
  output logic         vga_vsync,
  output logic         vga_blank_n
);
  // scene download
  logic         msg_valid, block_good, block_bad;
  logic [7:0]   msg_byte;
  logic         tc_we, lc_we, ic_we, sc_we;
  logic [15:0]  wr_addr;
  logic [287:0] wr_data;
  vec3_t        bbox_min, bbox_max;

  xmodem #(.CLKS_PER_BIT(CLKS_PER_BIT), .NAK_PERIOD(NAK_PERIOD)) u_xmodem (
    .clk, .rst, .rx(uart_rxd), .tx(uart_txd), .msg_valid, .msg_byte, .block_good,
    .block_bad, .done(xmodem_done));

  scene_loader u_loader (
    .clk, .rst, .msg_valid, .msg_byte, .block_good, .block_bad, .tc_we, .lc_we, .ic_we,
    .sc_we, .wr_addr, .wr_data, .bbox_min, .bbox_max, .loaded(scene_loaded));

  simple_cache #(.WIDTH(160), .DEPTH(TRI_DEPTH)) u_scache (
    .clk, .we(sc_we), .waddr(wr_addr[$clog2(TRI_DEPTH)-1:0]), .wdata(wr_data[159:0]),
    .raddr(scache_raddr), .rdata(scache_rdata));

  // camera
  logic       key_valid, key_pressed;
  logic [7:0] key_code;
  logic       frame_start, frame_done, cam_moved, cam_rotated;
  vec3_t      cam_e, cam_u, cam_v, cam_w;

  ps2_rx u_ps2 (.clk, .rst, .ps2_clk, .ps2_data, .key_valid, .key_code, .key_pressed);

  camera_ctl #(.CLK_HZ(CLK_HZ)) u_cam (
    .clk, .rst, .key_valid, .key_code, .key_pressed, .scene_loaded, .frame_done,
    .frame_start, .busy(rendering), .cam_e, .cam_u, .cam_v, .cam_w,
    .moved(cam_moved), .rotated(cam_rotated));

  // ray pipe
  logic        rp_pix_valid, rp_pix_ready;
  logic [18:0] rp_pix_addr;
  logic [15:0] rp_pix_color;
  logic [2:0]  level;
  logic        prg_active;
  logic        ev_scene_miss, ev_push, ev_pop, ev_restart, ev_exit_miss, ev_leaf;
  logic        ev_tri_test, ev_hit, ev_stall;

  raypipe #(.NUM_RAYS(NUM_RAYS), .NODE_DEPTH(NODE_DEPTH), .LIST_DEPTH(LIST_DEPTH),
            .TRI_DEPTH(TRI_DEPTH), .SS_DEPTH(SS_DEPTH)) u_raypipe (
    .clk, .rst, .start(frame_start), .res_level(sw_level), .cam_e, .cam_u, .cam_v, .cam_w,
    .level, .prg_active, .bbox_min, .bbox_max, .tc_we, .lc_we, .ic_we, .wr_addr, .wr_data,
    .pix_valid(rp_pix_valid), .pix_ready(rp_pix_ready), .pix_addr(rp_pix_addr),
    .pix_color(rp_pix_color), .ev_scene_miss, .ev_push, .ev_pop, .ev_restart, .ev_exit_miss,
    .ev_leaf, .ev_tri_test, .ev_hit, .ev_stall);

  // pixels to SRAM and VGA
  logic        pb_valid, pb_ready, pb_full;
  logic [18:0] pb_addr;
  logic [15:0] pb_color;
  logic        vga_pix_en, vga_fetch, vga_vblank_start;
  logic [9:0]  vga_x, vga_y, vga_fetch_x, vga_fetch_y;
  logic [2:0]  disp_level;
  logic        disp_buf;

  pixel_buffer #(.DEPTH(PB_DEPTH)) u_pixbuf (
    .clk, .rst, .in_valid(rp_pix_valid), .in_ready(rp_pix_ready), .in_addr(rp_pix_addr),
    .in_color(rp_pix_color), .out_valid(pb_valid), .out_ready(pb_ready), .out_addr(pb_addr),
    .out_color(pb_color), .level(), .full(pb_full));

  vga u_vga (
    .clk, .rst, .pix_en(vga_pix_en), .x(vga_x), .y(vga_y), .blank_n(vga_blank_n),
    .hsync(vga_hsync), .vsync(vga_vsync), .fetch(vga_fetch), .fetch_x(vga_fetch_x),
    .fetch_y(vga_fetch_y), .vblank_start(vga_vblank_start));

  fb_handler u_fb (
    .clk, .rst, .frame_start, .draw_level(sw_level), .frame_done, .disp_level, .disp_buf,
    .pix_valid(pb_valid), .pix_ready(pb_ready), .pix_addr(pb_addr), .pix_color(pb_color),
    .vga_fetch, .vga_fetch_x, .vga_fetch_y, .vga_vblank_start, .vga_blank_n,
    .vga_r, .vga_g, .vga_b, .sram_addr, .sram_wdata, .sram_rdata, .sram_we_n, .sram_oe_n);

  logic unused;
  assign unused = ^{cam_moved, cam_rotated, prg_active, ev_scene_miss, ev_push, ev_pop,
                    ev_restart, ev_exit_miss, ev_leaf, ev_tri_test, ev_hit, ev_stall,
                    vga_pix_en, vga_x, vga_y, disp_level, disp_buf, pb_full, wr_addr[15:11], level};
endmodule
