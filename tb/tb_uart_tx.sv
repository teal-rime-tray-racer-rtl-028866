// tb_uart_tx: sends random bytes through uart_tx and decodes the line by sampling each bit
// in the middle of its period; checks the start bit, the data, the stop bit, the frame
// length (10 bit periods) and that busy covers the whole frame.
module tb_uart_tx;
  localparam int CPB = 6;
  logic clk = 0, rst = 1, start = 0, busy, tx;
  logic [7:0] data;
  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b, got;
      int len;
      b = 8'($urandom);
      @(posedge clk);
      data <= b; start <= 1;
      @(posedge clk);
      start <= 0;
      while (tx) @(posedge clk);        // start bit begins
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (tx != 0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        got[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx != 1) begin failures++; $display("bad stop bit"); end
      checks++;
      if (got != b) begin failures++; $display("sent %h got %h", b, got); end
      len = 0;
      while (busy) begin @(posedge clk); len++; end
      checks++;
      if (len > CPB + 2 || len < CPB / 2 - 2) begin
        failures++; $display("busy ends %0d cycles after stop sample", len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
