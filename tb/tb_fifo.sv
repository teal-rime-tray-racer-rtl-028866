// tb_fifo: random pushes and pops on a 5-entry FIFO (a depth that is not a power of two,
// so the pointer wrap is exercised), checked against a queue model: data order, count,
// in_ready low exactly when full and out_valid low exactly when empty. Inputs change at the
// falling edge; the model is updated from the handshakes seen at the rising edge.
module tb_fifo;
  localparam int W = 12, D = 5;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_ready = 0, in_ready, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D+1)-1:0] count;
  always #5 clk = ~clk;

  fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] q[$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int k = 0; k < 20000; k++) begin
      bit push, pop;
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < (k % 2000 < 1000 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (k % 2000 < 1000 ? 30 : 70));
      in_data = W'($urandom);
      #1;
      chk(int'(count) == q.size(), "count differs from the model");
      chk(in_ready == (q.size() < D), "in_ready wrong");
      chk(out_valid == (q.size() > 0), "out_valid wrong");
      if (out_valid && q.size() > 0) chk(out_data == q[0], "data out of order");
      if (!in_ready) n_full++;
      push = in_valid && in_ready;
      pop = out_valid && out_ready;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    chk(n_full > 0, "FIFO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
