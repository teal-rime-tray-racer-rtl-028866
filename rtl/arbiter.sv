// arbiter: round-robin N-to-1 arbiter with a valid/ready handshake and a registered output.
//
// Each input i offers in_data[i] with in_valid[i]; the grant goes to the first valid input
// after the one granted last, so every requester is served within N grants (the report asks
// for "fair" arbitration of the units that share the traversal and list caches). The winner
// is captured in an output register, which is free when empty or being emptied in the same
// cycle (out_ready). in_ready[i] is high for exactly the granted input when the register can
// take it. The report only names its arbiters; round-robin and the single output register
// are this design's choice. Used as the traversal arbiter (tarb) and the list arbiter (larb).
module arbiter #(
  parameter int N     = 2,
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     in_valid,
  output logic [N-1:0]     in_ready,
  input  logic [WIDTH-1:0] in_data [N],
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(N+1)-1:0] out_src
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          any;
  logic          take;

  always_comb begin
    any  = 1'b0;
    pick = last;
    for (int k = 1; k <= N; k++) begin
      if (!any && in_valid[(int'(last) + k) % N]) begin
        any  = 1'b1;
        pick = IW'((int'(last) + k) % N);
      end
    end
  end

  assign take = any && (!out_valid || out_ready);

  always_comb begin
    in_ready = '0;
    if (take) in_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      last      <= IW'(N - 1);
      out_src   <= '0;
      out_data  <= '0;
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        out_data  <= in_data[pick];
        out_src   <= ($clog2(N+1))'(pick);
        last      <= pick;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (rst) $onehot0(in_ready));
endmodule
