// tb_simple_cache: writes random words to random addresses of a simple_cache and reads them
// back through the asynchronous read port, comparing against a model array. A write becomes
// visible on the read port from the next clock edge.
module tb_simple_cache;
  localparam int W = 48, D = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  always #5 clk = ~clk;

  simple_cache #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every entry once so every read has a defined value
    for (int a = 0; a < D; a++) begin
      model[a] = {$urandom, $urandom} & {W{1'b1}};
      we <= 1; waddr <= 6'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 2000; i++) begin
      logic [5:0] a;
      a = 6'($urandom);
      raddr <= 6'($urandom);
      if ($urandom_range(0, 1)) begin
        we <= 1; waddr <= a; wdata <= {$urandom, $urandom} & {W{1'b1}};
      end else we <= 0;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("addr %0d read %h expected %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
