// nf_tb_pkg: helpers shared by the testbenches: decoding and encoding of
// IEEE-754 single-precision values through the simulator's double-precision
// real type, so that references can be computed independently of the RTL.
package nf_tb_pkg;

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // single-precision bits to real (subnormals read as zero)
  function automatic real f2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
    return f[31] ? -m : m;
  endfunction

  // weight of the last significand bit of f
  function automatic real ulp(input logic [31:0] f);
    return pow2(int'(f[30:23]) - 150);
  endfunction

  // real to single-precision bits, round to nearest (normal range only)
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    int e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:0]} + 53'(1 << 28);   // round at bit 29
    if (m[52]) begin
      e = e + 1;
      m = 53'd0;
    end
    return {d[63], 8'(e), m[51:29]};
  endfunction

endpackage
