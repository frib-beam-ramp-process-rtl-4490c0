// tb_micro_dsp: self-checking test of micro_dsp. For operating points of the
// PRF ramp (step 1) and the PW ramps (steps 2-4) the outputs are compared
// with Eqs. 1-5 evaluated in double precision (within 0.01 % + 1 count),
// and the time from start to done must stay within 1 us (81 clocks).
module tb_micro_dsp;
  import ramp_pkg::*;
  localparam real K = 80.5e6;
  logic clk = 0, rst_n = 0, start = 0, freq_mode = 0, busy, done;
  logic [TIME_W-1:0] step_time;
  logic [31:0] rate, init, hold, tol_f, left;
  logic [31:0] cmax, cmin, pwmax1, pwmax2, pwmin;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  micro_dsp dut (.clk, .rst_n, .start, .freq_mode, .step_time, .rate, .init, .hold,
                 .tol_f, .left, .busy, .done, .cmax, .cmin, .pwmax1, .pwmax2, .pwmin);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [31:0] got, input real ref_v);
    real d;
    checks++;
    d = real'(got) - ref_v;
    if (d < 0) d = -d;
    if (d > 1.0 + ref_v * 1.0e-4) begin
      failures++;
      $display("FAIL %s got %0d expected %f", what, got, ref_v);
    end
  endtask

  task automatic run(input logic fm, input real t_s, input int r_q8, input int iv,
                     input int hv, input int tf, input int lf);
    real base, f, w, fx, fn, cn, cx;
    int n;
    freq_mode = fm;
    step_time = TIME_W'(longint'(t_s * K));
    rate = r_q8; init = iv; hold = hv; tol_f = tf; left = lf;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    n = 1;
    while (!done) begin @(posedge clk); #1; n++; end
    checks++;
    if (n > 81) begin failures++; $display("FAIL latency %0d clocks", n); end
    base = real'(iv) + real'(r_q8) / 256.0 * real'(step_time) / K;
    f  = fm ? base : real'(hv);
    w  = fm ? real'(hv) : base;
    fx = f + tf; fn = f - tf;
    cn = K / fx; cx = K / fn;
    cmp("cmax", cmax, cx);
    cmp("cmin", cmin, cn);
    cmp("pwmax1", pwmax1, w * cx / cn);
    cmp("pwmin", pwmin, w * cn / cx);
    cmp("pwmax2", pwmax2, w * real'(lf) / cn);
  endtask

  initial begin
    #22 rst_n = 1;
    run(1, 0.0,   197120, 2000, 49, 100, 9660);
    run(1, 12.3,  197120, 2000, 49, 100, 9660);
    run(1, 29.9,  197120, 2000, 49, 100, 6440);
    run(0, 15.0,  3091,   49,   25000, 100, 6440);
    run(0, 20.0,  7831,   403,  25000, 100, 9660);
    run(0, 390.0, 1016,   1610, 25000, 100, 9660);
    for (int i = 0; i < 20; i++)
      run(1'($urandom_range(0, 1)), real'($urandom_range(0, 30000)) / 1000.0,
          $urandom_range(1000, 300000), $urandom_range(40, 3000),
          $urandom_range(40, 25000), $urandom_range(1, 30), $urandom_range(3000, 20000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
