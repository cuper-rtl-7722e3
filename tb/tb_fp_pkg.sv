// tb_fp_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are converted between FP32 bit patterns and the simulator's double
// precision real; a double result is rounded to FP32 with round to nearest
// even. Products of two FP32 values are exact in double, and so are sums
// whose exponents differ by less than 29, which keeps these references exact
// for the operand ranges the testbenches use. Subnormal results flush to zero,
// like the design.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:29]};
    g = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) begin
      m = m + 1'b1;
      if (m == 24'd0) begin
        m = 24'h800000;
        e = e + 1;
      end
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal FP32 value with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_f(int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(0, 2 * span)));
    return {1'($urandom_range(0, 1)), e, 23'($urandom)};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

endpackage
