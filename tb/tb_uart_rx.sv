// tb_uart_rx: sends serial frames to uart_rx and checks the received bytes.
// 64 random bytes at 8 clocks per bit, with random idle gaps, must arrive in order and with
// the right timing (byte_valid about 9.5 bit periods after the start edge); a frame with a
// low stop bit must be dropped.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rx = 1;
  logic byte_valid;
  logic [7:0] byte_data;
  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] exp_q[$];
  int start_cycle, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b, bit good_stop = 1);
    logic [9:0] f;
    f = {good_stop, b, 1'b0};
    start_cycle = cycle;
    for (int i = 0; i < 10; i++) begin
      rx <= f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  always @(posedge clk) begin
    if (byte_valid && !rst) begin
      checks++;
      if (exp_q.size() == 0 || byte_data != exp_q[0]) begin
        failures++;
        $display("unexpected byte %h", byte_data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      checks++;
      if (cycle != start_cycle && cycle - start_cycle < 9 * CPB || cycle - start_cycle > 11 * CPB) begin
        failures++;
        $display("byte late/early: %0d cycles", cycle - start_cycle);
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp_q.push_back(b);
      send(b);
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    send(8'hA5, 0);             // framing error: dropped
    rx <= 1;
    repeat (3 * CPB) @(posedge clk);
    exp_q.push_back(8'h3C);
    send(8'h3C);
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d bytes missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
