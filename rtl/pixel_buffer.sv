// pixel_buffer: queue of finished pixels between the ray pipe and the frame buffer handler.
//
// The frame buffer handler can only write to SRAM in the cycles that the VGA read-out leaves
// free, while the ray pipe may produce a pixel in any cycle. The buffer absorbs the
// difference; when it is full, in_ready drops and the stall propagates back into the ray
// pipe. Entries are {pixel index, RGB565 colour}. DEPTH is this design's choice (the report
// gives no size); level reports the fill for monitoring and full flags a stall.
module pixel_buffer #(
  parameter int DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [18:0] in_addr,
  input  logic [15:0] in_color,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [18:0] out_addr,
  output logic [15:0] out_color,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic        full
);
  typedef struct packed {
    logic [18:0] addr;
    logic [15:0] color;
  } pix_t;

  pix_t mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] wp, rp;

  assign full      = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (level != 0);
  assign out_addr  = mem[rp].addr;
  assign out_color = mem[rp].color;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp] <= '{addr: in_addr, color: in_color};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
      level <= level + $bits(level)'(in_valid && in_ready) - $bits(level)'(out_valid && out_ready);
    end
  end
endmodule
