// sram_model: behavioural model of the board's 1M x 16 asynchronous SRAM for testbenches.
// Reads are combinational: rdata shows the addressed word while oe_n is low (0 otherwise).
// A write stores wdata at addr on the clock edge at which we_n is low, which is how the
// frame-buffer handler drives the chip (one access per clock). Words never written read as
// 0. Also counts reads and writes for the testbenches' mechanism checks.
module sram_model (
  input  logic        clk,
  input  logic [19:0] addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  input  logic        we_n,
  input  logic        oe_n
);
  logic [15:0] mem [1 << 20];
  int n_reads = 0, n_writes = 0;

  initial foreach (mem[i]) mem[i] = 16'd0;

  assign rdata = oe_n ? 16'd0 : mem[addr];

  always @(posedge clk) begin
    if (!we_n) begin
      mem[addr] <= wdata;
      n_writes++;
    end
    if (!oe_n) n_reads++;
  end

  function automatic logic [15:0] peek(int a);
    return mem[a];
  endfunction
endmodule
