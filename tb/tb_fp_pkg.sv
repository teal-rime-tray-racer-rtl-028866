// tb_fp_pkg: testbench helpers converting between real numbers and the design's 24-bit
// float (upper 24 bits of an IEEE single), computed independently of the RTL functions.
package tb_fp_pkg;
  function automatic real to_real(logic [23:0] f);
    real r;
    int  e;
    if (f[22:15] == 0) return 0.0;
    e = int'(f[22:15]) - 127;
    r = 1.0 + real'(f[14:0]) / 32768.0;
    while (e > 0) begin r = r * 2.0; e--; end
    while (e < 0) begin r = r / 2.0; e++; end
    return f[23] ? -r : r;
  endfunction

  function automatic logic [23:0] from_real(real r);
    logic [63:0] b;
    int          e;
    if (r == 0.0) return 24'd0;
    b = $realtobits(r);
    e = int'(b[62:52]) - 1023 + 127;
    return {b[63], e[7:0], b[51:37]};
  endfunction

  function automatic bit close(real a, real b, real tol);
    real d, m;
    d = a - b; if (d < 0) d = -d;
    m = (a < 0) ? -a : a;
    if (m < 1.0) m = 1.0;
    return d <= tol * m;
  endfunction
endpackage
