// tb_pixel_buffer: pushes random (address, colour) pairs into a small pixel_buffer while the
// reader stalls at random, including long stalls that fill it. Checks order and contents,
// that level tracks the model queue, that full is raised exactly at DEPTH and that nothing
// is accepted while full.
module tb_pixel_buffer;
  localparam int D = 8;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, full;
  logic [18:0] in_addr = '0, out_addr;
  logic [15:0] in_color = '0, out_color;
  logic [$clog2(D+1)-1:0] level;
  always #5 clk = ~clk;

  pixel_buffer #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_in = 0, n_out = 0, n_full = 0;
  logic [34:0] q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    checks++;
    if (int'(level) != q.size() || full != (q.size() == D) || out_valid != (q.size() != 0)) begin
      failures++;
      $display("level %0d full %b, model %0d", level, full, q.size());
    end
    if (full) n_full++;
    if (out_valid && out_ready) begin
      checks++;
      if ({out_addr, out_color} != q[0]) begin
        failures++; $display("pixel %0d wrong", n_out);
      end
      void'(q.pop_front());
      n_out++;
    end
    if (in_valid && in_ready) begin
      q.push_back({in_addr, in_color});
      n_in++;
    end
    if (!(in_valid && !in_ready)) begin
      in_valid <= $urandom_range(0, 3) != 0;
      in_addr  <= 19'($urandom);
      in_color <= 16'($urandom);
    end
    // long reader stalls in the middle of the run
    out_ready <= (cyc > 300 && cyc < 360) ? 1'b0 : ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (n_out >= 1000);
    checks++;
    if (n_full == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
