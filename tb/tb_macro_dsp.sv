// tb_macro_dsp: self-checking test of macro_dsp. For each ramp step a run of
// MCs is computed, the first with S1; bt_max/bt_min of every MC are
// compared with F(t)W(t) at the MC's middle times the beam-allowed time Tb
// of the MC (10 ms less the 50 us notch), plus or minus E*Tb, evaluated in
// double precision, and the time from start to
// done must stay within 1 us (81 clocks).
module tb_macro_dsp;
  import ramp_pkg::*;
  localparam real K = 80.5e6;
  logic clk = 0, rst_n = 0, start = 0, init_step = 0, busy, done;
  logic [31:0] t_mc, t_beam, rate, init, hold, e_tol, bt_max, bt_min;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  macro_dsp dut (.clk, .rst_n, .start, .init_step, .t_mc, .t_beam, .rate, .init, .hold, .e_tol,
                 .busy, .done, .bt_max, .bt_min);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [31:0] got, input real ref_v);
    real d;
    checks++;
    d = real'(got) - ref_v;
    if (d < 0) d = -d;
    if (d > 2.0 + ref_v * 1.0e-4) begin
      failures++;
      $display("FAIL %s got %0d expected %f", what, got, ref_v);
    end
  endtask

  // steps: the ramping quantity X starts at iv and grows by r per second
  task automatic run_step(input int r_q8, input int iv, input int hv, input int e, input int n_mc);
    real x0, r, tsec, tb, g;
    int n;
    t_mc = 805000; t_beam = 800975; rate = r_q8; init = iv; hold = hv; e_tol = e;
    r = real'(r_q8) / 256.0;
    tsec = 805000.0 / K;
    tb = 800975.0 / K;
    for (int m = 0; m < n_mc; m++) begin
      init_step = (m == 0);
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      checks++;
      if (n > 81) begin failures++; $display("FAIL latency %0d", n); end
      x0 = real'(iv) + r * tsec * m;
      g  = (x0 + r * tsec / 2.0) * real'(hv) * tb;   // Eq. 7 / 8, beam-allowed time
      cmp("bt_max", bt_max, g + real'(e) * tb);
      cmp("bt_min", bt_min, g - real'(e) * tb);
    end
  endtask

  initial begin
    #22 rst_n = 1;
    run_step(197120, 2000, 49, 40000, 50);     // step 1
    run_step(3091, 49, 25000, 55000, 20);      // step 2
    run_step(7831, 403, 25000, 190000, 20);    // step 3
    run_step(1016, 1610, 25000, 555000, 20);   // step 4
    run_step(2560000, 49, 25000, 55000, 20);   // fast PW ramp
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
