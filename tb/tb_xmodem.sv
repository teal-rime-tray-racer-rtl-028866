// tb_xmodem: plays an XMODEM sender over the serial line and checks the receiver.
// Sequence: wait for the receiver's NAK; block 1 (good, ACK); block 2 with a bad checksum
// (block_bad, NAK); block 2 again (good, ACK); block 2 repeated (block_bad, ACK); block 4
// (wrong number: block_bad, NAK); block 3 with a bad inverted number (NAK); block 3 (good);
// EOT (ACK, done). Every data byte must be passed on (msg_valid) in order.
module tb_xmodem;
  localparam int CPB = 4;
  logic clk = 0, rst = 1, rx = 1, tx;
  logic msg_valid, block_good, block_bad, done;
  logic [7:0] msg_byte;
  always #5 clk = ~clk;

  xmodem #(.CLKS_PER_BIT(CPB), .NAK_PERIOD(3000)) dut (.*);

  int checks = 0, failures = 0;
  int n_good = 0, n_bad = 0;
  logic [7:0] reply_q[$];
  logic [7:0] msg_q[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host-side receiver for the replies
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = tx;
        repeat (CPB) @(posedge clk);
      end
      reply_q.push_back(b);
    end
  end

  always @(posedge clk) if (!rst) begin
    if (msg_valid) msg_q.push_back(msg_byte);
    n_good += int'(block_good);
    n_bad  += int'(block_bad);
  end

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx <= f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  task automatic send_block(logic [7:0] num, logic [7:0] seed, bit bad_sum = 0,
                            bit bad_inv = 0);
    logic [7:0] sum;
    sum = 0;
    send_byte(8'h01);
    send_byte(num);
    send_byte(bad_inv ? num : ~num);
    for (int i = 0; i < 128; i++) begin
      send_byte(8'(seed + i * 3));
      sum += 8'(seed + i * 3);
    end
    send_byte(bad_sum ? sum + 1 : sum);
  endtask

  task automatic expect_reply(logic [7:0] r, string what);
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (reply_q.size() == 0 || reply_q[$] != r) begin
      failures++;
      $display("%s: expected reply %h, got %h", what, r,
               reply_q.size() ? reply_q[$] : 8'hxx);
    end
    reply_q.delete();
  endtask

  task automatic expect_counts(int g, int b, string what);
    checks++;
    if (n_good != g || n_bad != b) begin
      failures++;
      $display("%s: good %0d bad %0d, expected %0d %0d", what, n_good, n_bad, g, b);
    end
  endtask

  task automatic expect_data(logic [7:0] seed, string what);
    checks++;
    if (msg_q.size() != 128) begin
      failures++; $display("%s: %0d data bytes", what, msg_q.size());
    end else
      for (int i = 0; i < 128; i++)
        if (msg_q[i] != 8'(seed + i * 3)) begin
          failures++; $display("%s: byte %0d wrong", what, i); break;
        end
    msg_q.delete();
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (reply_q.size() > 0);
    checks++;
    if (reply_q[0] != 8'h15) begin failures++; $display("no initial NAK"); end
    reply_q.delete();
    send_block(1, 8'h10);          expect_reply(8'h06, "block 1");
    expect_counts(1, 0, "block 1"); expect_data(8'h10, "block 1");
    send_block(2, 8'h20, 1);       expect_reply(8'h15, "bad checksum");
    expect_counts(1, 1, "bad checksum"); msg_q.delete();
    send_block(2, 8'h20);          expect_reply(8'h06, "block 2");
    expect_counts(2, 1, "block 2"); expect_data(8'h20, "block 2");
    send_block(2, 8'h20);          expect_reply(8'h06, "repeat");
    expect_counts(2, 2, "repeat"); msg_q.delete();
    send_block(4, 8'h40);          expect_reply(8'h15, "wrong number");
    expect_counts(2, 3, "wrong number"); msg_q.delete();
    send_block(3, 8'h30, 0, 1);    expect_reply(8'h15, "bad inverse");
    expect_counts(2, 4, "bad inverse"); msg_q.delete();
    send_block(3, 8'h30);          expect_reply(8'h06, "block 3");
    expect_counts(3, 4, "block 3"); expect_data(8'h30, "block 3");
    send_byte(8'h04);              expect_reply(8'h06, "EOT");
    checks++;
    if (!done) begin failures++; $display("done not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
