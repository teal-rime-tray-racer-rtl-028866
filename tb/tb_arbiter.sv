// tb_arbiter: random traffic through a 3-input round-robin arbiter.
// Each input holds a queue of tagged words and presents them with valid/ready; the output is
// stalled at random. Checks: every word comes out exactly once, in order per input, with the
// right out_src; at most one grant per cycle; while all three inputs are busy no input waits
// more than two grants (round-robin fairness).
module tb_arbiter;
  localparam int N = 3, W = 12;
  logic clk = 0, rst = 1;
  logic [N-1:0] in_valid = '0, in_ready;
  logic [W-1:0] in_data [N];
  logic out_valid, out_ready = 0;
  logic [W-1:0] out_data;
  logic [$clog2(N+1)-1:0] out_src;
  always #5 clk = ~clk;

  arbiter #(.N(N), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N] = '{0, 0, 0};
  int recv [N] = '{0, 0, 0};
  int wait_cnt [N] = '{0, 0, 0};
  localparam int PER_INPUT = 300;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word = {input, sequence}
  always_comb for (int i = 0; i < N; i++) in_data[i] = W'({i[1:0], 10'(sent[i])});

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (!$onehot0(in_ready)) begin failures++; $display("two grants"); end
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          sent[i]++;
          wait_cnt[i] = 0;
        end else if (in_valid[i] && &in_valid && |in_ready) begin
          wait_cnt[i]++;
          checks++;
          if (wait_cnt[i] > 2) begin failures++; $display("input %0d starved", i); end
        end
        in_valid[i] <= (sent[i] + ((in_valid[i] && in_ready[i]) ? 0 : 0) < PER_INPUT) &&
                       ($urandom_range(0, 3) != 0 || (in_valid[i] && !in_ready[i]));
      end
      if (out_valid && out_ready) begin
        int s;
        s = int'(out_data[11:10]);
        checks++;
        if (int'(out_src) != s || int'(out_data[9:0]) != recv[s] % 1024) begin
          failures++;
          $display("got src %0d data %h, expected input %0d seq %0d", out_src, out_data, s, recv[s]);
        end
        recv[s]++;
      end
      out_ready <= ($urandom_range(0, 4) != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (recv[0] == PER_INPUT && recv[1] == PER_INPUT && recv[2] == PER_INPUT);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent[i] != PER_INPUT) begin failures++; $display("input %0d sent %0d", i, sent[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
