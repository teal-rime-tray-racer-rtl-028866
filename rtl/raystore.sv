// raystore: holds the origin and direction of every ray in flight, indexed by ray ID.
//
// Units that need a ray's full vectors look them up here by ID instead of carrying 144 bits
// through every pipeline stage. The shader writes a ray when it dispatches it (we, waddr,
// wdata); every reader has its own copy of the store, all written together, so there is no
// read contention and no arbiter. The read port is combinational (rdata = mem[raddr]).
// Replication and the absence of an arbiter follow the report's simplified raystore;
// NUM_RAYS = 512 is the report's number of ray IDs.
module raystore
  import rt_pkg::*;
#(
  parameter int NUM_RAYS = 512
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(NUM_RAYS)-1:0] waddr,
  input  ray_t                        wdata,
  input  logic [$clog2(NUM_RAYS)-1:0] raddr,
  output ray_t                        rdata
);
  ray_t mem [NUM_RAYS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
