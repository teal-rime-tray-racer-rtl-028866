// tb_ps2_rx: acts as a PS/2 keyboard. Sends make codes, F0-prefixed break codes, E0-prefixed
// extended codes and a frame with a parity error, with the keyboard clock at about 1/40 of
// the system clock. Checks key_valid/key_code/key_pressed for each key event and that the
// bad frame is ignored.
module tb_ps2_rx;
  logic clk = 0, rst = 1, ps2_clk = 1, ps2_data = 1;
  logic key_valid, key_pressed;
  logic [7:0] key_code;
  always #5 clk = ~clk;

  ps2_rx dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] exp_q[$];   // {pressed, code}

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && key_valid) begin
    checks++;
    if (exp_q.size() == 0 || {key_pressed, key_code} != exp_q[0]) begin
      failures++;
      $display("unexpected key %h pressed %b", key_code, key_pressed);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  task automatic send(logic [7:0] b, bit bad_parity = 0);
    logic [10:0] f;
    f = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data <= f[i];
      repeat (20) @(posedge clk);
      ps2_clk <= 0;
      repeat (20) @(posedge clk);
      ps2_clk <= 1;
    end
    repeat ($urandom_range(30, 200)) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] k;
      k = 8'($urandom_range(1, 8'h83));
      if (k == 8'hE0 || k == 8'hF0) k = 8'h1D;
      case ($urandom_range(0, 2))
        0: begin exp_q.push_back({1'b1, k}); send(k); end
        1: begin exp_q.push_back({1'b0, k}); send(8'hF0); send(k); end
        default: begin
          exp_q.push_back({1'b1, k}); send(8'hE0); send(k);
          exp_q.push_back({1'b0, k}); send(8'hE0); send(8'hF0); send(k);
        end
      endcase
    end
    send(8'h1C, 1);           // parity error: ignored
    exp_q.push_back({1'b1, 8'h1B});
    send(8'h1B);
    repeat (100) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d keys missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
