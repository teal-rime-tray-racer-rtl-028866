// simple_cache: on-chip scene memory standing in for a cache in front of external memory.
//
// DEPTH words of WIDTH bits. The scene loader writes it through the write port (we, waddr,
// wdata) while the scene is downloaded; the ray pipe reads it through the read port, which
// returns mem[raddr] in the same cycle (an asynchronous read, so the lookup fits inside the
// single-cycle fetch stages of the ray pipe). Addresses are the units' own IDs (node ID, list
// index, triangle ID), as in the report. Instances: tcache (k-d tree nodes), lcache (triangle
// ID lists), icache (triangle transforms) and scache (triangle colour and normal). The
// report's memories are block RAMs filled directly by the scene loader; the combinational
// read and the sizes are this design's choice.
module simple_cache #(
  parameter int WIDTH = 48,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
