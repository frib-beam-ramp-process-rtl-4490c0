// tb_fp_util: reference conversions between real and single-precision bit
// patterns for the floating-point testbenches, written independently of the
// RTL: they go through the simulator's double-precision real type.
package tb_fp_util;

  // real -> fp32 with truncation (round toward zero), flush of tiny values.
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 11'd0 || e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hFE, 23'h7FFFFF};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Distance in units of the last place between two same-sign values.
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    int d;
    d = int'(a[30:0]) - int'(b[30:0]);
    if (a[31] != b[31] && (a[30:0] != 0 || b[30:0] != 0)) return 1 << 30;
    return d < 0 ? -d : d;
  endfunction

  // Random positive real spread over many decades.
  function automatic real rnd_real();
    real m;
    int  e;
    m = 1.0 + real'($urandom_range(0, 1_000_000)) / 1_000_000.0;
    e = int'($urandom_range(0, 40)) - 20;
    return m * (2.0 ** e);
  endfunction

endpackage
