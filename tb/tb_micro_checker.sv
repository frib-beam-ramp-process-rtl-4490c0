// tb_micro_checker: test of micro_checker fed by pulse_counter and the
// behavioural pulse generator over steps 1-4 of a shortened ramp (1 ms MC).
// Stage, step time and the MC-start trigger are produced here the way the
// control block does. Checked: every pulse's PW and cycle fall inside the
// envelope in force at its done strobe and no fault occurs while the ramp
// is clean; extend and shrink decisions both occur; an over-wide pulse
// raises tw_fault while it is still high, one clock after its count passes
// the maximum; a shortened cycle raises tc_fault at its done strobe. For
// maintained pulses the envelope centre is also compared with the PRF and
// PW of the ramp equations, worked out here in real arithmetic.
module tb_micro_checker;
  import ramp_pkg::*;
  localparam int TMC = 80500, NOTCH = 4025;
  logic clk = 0, rst_n = 0;
  logic gate, mc_tick, run = 0, inj_pw = 0, inj_cyc = 0, clr = 0;
  int gen_stage, n_extend, n_shrink, n_pulses;
  int w0[3] = '{49, 403, 1610};
  int rw[3] = '{256 * 40000, 256 * 60000, 256 * 60000};
  int dur[5] = '{4, 3, 3, 8, 3};
  cfg_t cfg;
  stage_e stage = ST_IDLE;
  logic [TIME_W-1:0] step_time = 0;
  logic calc_mc = 0;
  logic g, pulse_start, tw_active, tw_rdy, tc_active, tc_rdy, mc_rdy;
  logic [31:0] tw_count, tw_last, tc_count, tc_last, bt_count, bt_last, mc_time;
  logic exp_valid; la_e cur_la;
  logic [31:0] tc_max_exp, tc_min_exp, tw_max_exp, tw_min_exp;
  logic tw_fault, tc_fault, tw_fault_evt, tc_fault_evt;
  int checks = 0, failures = 0, n_ext = 0, n_shr = 0, n_env = 0;
  logic clean = 1;
  always #5 clk = ~clk;

  tb_ramp_gen gen (.clk, .run, .t_mc(TMC), .notch(NOTCH), .f0(10000), .rate_f_q8(256 * 3000000), .grid(0),
    .pw_const(49), .prf_const(25000), .pw_start(49), .w0, .rate_w_q8(rw), .dur,
    .inj_pw, .inj_cyc, .inj_bt(1'b0), .gate, .mc_tick, .gen_stage, .n_extend, .n_shrink, .n_pulses);

  pulse_counter u_cnt (.clk, .rst_n, .gate_gts(gate), .gate_hv(1'b0), .gate_cp(1'b0),
    .src_sel(2'd0), .mc_tick, .gate(g), .pulse_start, .tw_count, .tw_active, .tw_rdy, .tw_last,
    .tc_count, .tc_active, .tc_rdy, .tc_last, .bt_count, .mc_rdy, .bt_last, .mc_time);

  micro_checker dut (.clk, .rst_n, .cfg, .stage, .step_time, .calc_mc, .clr, .pulse_start,
    .tw_count, .tw_active, .tw_rdy, .tw_last, .tc_count, .tc_active, .tc_rdy, .tc_last, .mc_time,
    .exp_valid, .cur_la, .tc_max_exp, .tc_min_exp, .tw_max_exp, .tw_min_exp,
    .tw_fault, .tc_fault, .tw_fault_evt, .tc_fault_evt);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control: stage follows the generator, changing at the MC tick
  always @(posedge clk) begin
    calc_mc <= mc_tick;
    if (mc_tick) begin
      if (stage_e'(gen_stage) != stage) step_time <= 0; else step_time <= step_time + 1;
      stage <= stage_e'(gen_stage > 4 ? 0 : gen_stage);
    end else step_time <= step_time + 1;
  end

  always @(posedge clk) if (rst_n && clean && exp_valid) begin
    if (tw_rdy) begin
      checks++; n_env++;
      if (tw_last > tw_max_exp || tw_last < tw_min_exp) begin
        failures++; $display("FAIL tw %0d not in [%0d,%0d] stage %0d", tw_last, tw_min_exp, tw_max_exp, stage);
      end
    end
    if (tc_rdy) begin
      checks++;
      if (cur_la == LA_EXTEND) n_ext++;
      if (cur_la == LA_SHRINK) n_shr++;
      if (tc_last > tc_max_exp || tc_last < tc_min_exp) begin
        failures++; $display("FAIL tc %0d not in [%0d,%0d] stage %0d", tc_last, tc_min_exp, tc_max_exp, stage);
      end
    end
  end

  // Independent model of the envelope centre: for a pulse starting at step
  // time t the PRF is F(t) and the PW W(t) of the ramp equations, computed
  // here in real arithmetic. For maintained pulses the centre of the cycle
  // window must be 80.5e6/F and that of the PW window W, within 0.3 % plus
  // two counts (the window is placed at the predicted, not the actual, start).
  logic [TIME_W-1:0] t_start;
  int n_model = 0;
  always @(posedge clk) if (pulse_start) t_start <= step_time;
  always @(posedge clk) if (rst_n && clean && exp_valid && tw_rdy && cur_la == LA_MAINTAIN
                            && stage >= ST_STEP1 && stage <= ST_STEP4) begin
    real f, w, c, mid_c, mid_w, t;
    t = real'(t_start) / 80.5e6;
    if (stage == ST_STEP1) begin
      f = 10000.0 + 3000000.0 * t; w = 49.0;
    end else begin
      f = 25000.0; w = w0[int'(stage) - 2] + rw[int'(stage) - 2] / 256.0 * t;
    end
    c = 80.5e6 / f;
    mid_c = (real'(tc_max_exp) + real'(tc_min_exp)) / 2.0;
    mid_w = (real'(tw_max_exp) + real'(tw_min_exp)) / 2.0;
    checks++; n_model++;
    if (mid_c > c * 1.003 + 2.0 || mid_c < c * 0.997 - 2.0 ||
        mid_w > w * 1.003 + 2.0 || mid_w < w * 0.997 - 2.0) begin
      failures++;
      $display("FAIL model stage %0d t %0d: cycle centre %f vs %f, PW centre %f vs %f",
               stage, t_start, mid_c, c, mid_w, w);
    end
  end

  always @(posedge clk) if (rst_n && clean && (tw_fault || tc_fault)) begin
    checks++; failures++; clean = 0;
    $display("FAIL unexpected fault tw=%0d tc=%0d", tw_fault, tc_fault);
  end

  initial begin
    int n;
    logic crossed;
    cfg = '0;
    cfg.step[0] = '{init: 10000, rate: 256 * 3000000, dur_mc: 0, bt_tol: 0};
    for (int s = 0; s < 3; s++) cfg.step[s + 1] = '{init: w0[s], rate: rw[s], dur_mc: 0, bt_tol: 0};
    cfg.prf_const = 25000; cfg.pw_const = 49; cfg.pw_start = 49; cfg.tol_f = 100; cfg.tol_w = 10;
    cfg.cyc_step = 1000; cfg.t_mc = TMC; cfg.notch = NOTCH;
    #22 rst_n = 1;
    repeat (2) @(posedge mc_tick);
    @(negedge clk); run = 1;
    wait (gen_stage == 4);
    repeat (2) @(posedge mc_tick);
    clean = 0;
    // over-wide pulse
    @(negedge clk); inj_pw = 1; @(negedge clk); inj_pw = 0;
    crossed = 0; n = 0;
    while (!tw_fault && n < TMC) begin
      @(posedge clk); #1 n++;
      if (crossed) begin
        checks++;
        if (!tw_fault_evt) begin failures++; $display("FAIL tw fault not one clock after crossing"); end
        break;
      end
      crossed = exp_valid && tw_active && (tw_count > tw_max_exp);
    end
    #1;
    checks++;
    if (!tw_fault || !tw_active) begin failures++; $display("FAIL tw fault %0d active %0d", tw_fault, tw_active); end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    checks++; if (tw_fault) failures++;
    // shortened cycle
    @(negedge clk); inj_cyc = 1; @(negedge clk); inj_cyc = 0;
    n = 0;
    while (!tc_fault && n < TMC) begin @(posedge clk); n++; end
    checks++;
    if (!tc_fault) begin failures++; $display("FAIL tc fault not raised"); end
    checks++; if (n_ext == 0 || n_shr == 0) begin failures++; $display("FAIL la ext %0d shr %0d", n_ext, n_shr); end
    checks++; if (n_model < 100) begin failures++; $display("FAIL only %0d model checks", n_model); end
    checks++; if (n_env < 100) begin failures++; $display("FAIL only %0d pulses checked", n_env); end
    $display("pulses checked %0d, extend %0d, shrink %0d", n_env, n_ext, n_shr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
