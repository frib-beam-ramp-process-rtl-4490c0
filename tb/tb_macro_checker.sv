// tb_macro_checker: test of macro_checker with a synthetic beam-on counter.
// For MCs of ramp steps 1 and 2 the envelope produced after each MC start is
// compared with the integral of F(t)W(t) over the MC plus or minus E*T,
// scaled to the beam-allowed part of the MC (MC less the notch), in double
// precision within 0.01 % + 2 counts; then a BT total inside the
// envelope must pass, a total below the minimum must fault at the MC end,
// and a running count above the maximum must fault before the MC ends.
// Outside the ramp steps no check may be made.
module tb_macro_checker;
  import ramp_pkg::*;
  localparam real K = 80.5e6;
  localparam int TMC = 805000, TB = 800975;   // MC and its beam-allowed part
  logic clk = 0, rst_n = 0, calc_mc = 0, first_mc = 0, clr = 0, mc_rdy = 0;
  cfg_t cfg;
  stage_e stage = ST_IDLE;
  logic [31:0] bt_count = 0, bt_last = 0, bt_max_exp, bt_min_exp;
  logic exp_valid, bt_fault, bt_fault_evt;
  int checks = 0, failures = 0, n_under = 0, n_over = 0;
  always #5 clk = ~clk;

  macro_checker dut (.clk, .rst_n, .cfg, .stage, .calc_mc, .first_mc, .clr, .bt_count, .mc_rdy,
                     .bt_last, .exp_valid, .bt_max_exp, .bt_min_exp, .bt_fault, .bt_fault_evt);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [31:0] got, input real ref_v);
    real d;
    checks++;
    d = real'(got) - ref_v; if (d < 0) d = -d;
    if (d > 2.0 + ref_v * 1.0e-4) begin failures++; $display("FAIL %s %0d expected %f", what, got, ref_v); end
  endtask

  // one MC: start trigger, wait for the envelope, then present the BT count
  // kind 0: total in range, 1: total below min, 2: running count above max
  task automatic mc(input stage_e st, input logic first, input real g, input real e, input int kind);
    int n;
    logic [31:0] tot;
    @(negedge clk); stage = st; calc_mc = 1; first_mc = first; bt_count = 0;
    @(negedge clk); calc_mc = 0; first_mc = 0;
    repeat (60) @(negedge clk);
    if (st == ST_IDLE || st == ST_FULL) begin
      checks++; if (exp_valid) begin failures++; $display("FAIL envelope outside ramp"); end
      tot = 0;
    end else begin
      checks++; if (!exp_valid) begin failures++; $display("FAIL no envelope"); end
      cmp("bt_max", bt_max_exp, (g + e * TMC / K) * real'(TB) / real'(TMC));
      cmp("bt_min", bt_min_exp, (g - e * TMC / K) * real'(TB) / real'(TMC));
      tot = (kind == 1) ? bt_min_exp - 5 : (bt_min_exp + bt_max_exp) / 2;
    end
    if (kind == 2) begin
      bt_count = bt_max_exp + 1;
      @(negedge clk);
      checks++;
      if (!bt_fault_evt) begin failures++; $display("FAIL over max not flagged"); end else n_over++;
    end
    bt_count = tot;
    @(negedge clk);
    bt_last = tot; mc_rdy = 1;
    @(negedge clk); mc_rdy = 0;
    checks++;
    if (kind == 1) begin
      if (!bt_fault_evt) begin failures++; $display("FAIL under min not flagged"); end else n_under++;
    end else if (kind == 0) begin
      if (bt_fault) begin failures++; $display("FAIL unexpected fault"); end
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
  endtask

  initial begin
    real f0, rf, w, tsec, x;
    cfg = '0;
    cfg.step[0] = '{init: 2000, rate: 197120, dur_mc: 0, bt_tol: 40000};
    cfg.step[1] = '{init: 49, rate: 256 * 400, dur_mc: 0, bt_tol: 55000};
    cfg.pw_const = 49; cfg.prf_const = 25000; cfg.t_mc = TMC; cfg.notch = TMC - TB;
    tsec = TMC / K;
    #22 rst_n = 1;
    mc(ST_IDLE, 0, 0, 0, 0);                 // no check outside the ramp
    checks++; if (bt_fault) failures++;
    f0 = 2000; rf = 770; w = 49;
    for (int m = 0; m < 8; m++) begin
      x = f0 + rf * tsec * m;
      mc(ST_STEP1, m == 0, (x * tsec + rf * tsec * tsec / 2) * w, 40000, m % 3);
    end
    for (int m = 0; m < 8; m++) begin
      x = 49 + 400.0 * tsec * m;
      mc(ST_STEP2, m == 0, (x * tsec + 400.0 * tsec * tsec / 2) * 25000, 55000, m % 3);
    end
    mc(ST_FULL, 0, 0, 0, 0);
    checks++; if (bt_fault) failures++;
    checks++; if (n_under == 0 || n_over == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
