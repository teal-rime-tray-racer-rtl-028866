// tb_raystore: stores random rays under random IDs and reads them back, checking the
// asynchronous read port against a model; also checks that writing one ID leaves the others
// untouched.
module tb_raystore;
  import rt_pkg::*;
  localparam int NR = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  ray_t wdata = '0, rdata;
  ray_t model [NR];
  always #5 clk = ~clk;

  raystore #(.NUM_RAYS(NR)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ray_t rand_ray();
    ray_t r;
    for (int i = 0; i < 6; i++) r[i*24 +: 24] = 24'($urandom);
    return r;
  endfunction

  initial begin
    for (int a = 0; a < NR; a++) begin
      model[a] = rand_ray();
      we <= 1; waddr <= 6'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 3000; i++) begin
      raddr <= 6'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        we <= 1; waddr <= 6'($urandom); wdata <= rand_ray();
      end else we <= 0;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("ray %0d read back wrong", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
