// tb_ramp_checker_full: one complete cold-start ramp through the checker at
// full size: default parameters, the reset configuration (10 ms machine
// cycle, 50 us notch, 2 kHz start at 0.77 kHz/s, PW ramps of 0.15, 0.38 and
// 0.0493 us/s, the lab-test tolerances), with only the length of each stage
// cut to two MCs so that the run ends in seconds. A behavioural generator
// plays the same ramp; as a timing-system generator does, it builds the
// step 1 cycles from whole multiples of 40 us (PRFs of 25 kHz / n), mixing
// neighbouring n so the mean PRF follows the ramp. Checked: the stage sequence, no fault anywhere,
// every pulse record inside its envelope, every MC's beam-on count equal
// to the testbench's own count of gate-high clocks, and that every stage
// was reached.
module tb_ramp_checker_full;
  import ramp_pkg::*;
  localparam int TMC = 805000, NOTCH = 4025;
  logic clk = 0, rst_n = 0;
  logic gate, mc_tick;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic beam_off; logic [2:0] faults, fault_evt; stage_e stage; logic [15:0] dropped;
  rec_t rec0, rec1; logic rec0_valid, rec1_valid;
  logic run = 0;
  int gen_stage, n_extend, n_shrink, n_pulses;
  int checks = 0, failures = 0;
  int w0[3] = '{49, 403, 1610};
  int rw[3] = '{3091, 7831, 1016};
  int dur[5] = '{2, 2, 2, 2, 2};
  int m_stage[7] = '{0, 0, 0, 0, 0, 0, 0};
  int m_rec0 = 0;
  always #5 clk = ~clk;

  tb_ramp_gen gen (.clk, .run, .t_mc(TMC), .notch(NOTCH), .f0(2000), .rate_f_q8(197120), .grid(3220),
    .pw_const(49), .prf_const(25000), .pw_start(49), .w0, .rate_w_q8(rw), .dur,
    .inj_pw(1'b0), .inj_cyc(1'b0), .inj_bt(1'b0), .gate, .mc_tick, .gen_stage, .n_extend,
    .n_shrink, .n_pulses);

  ramp_checker_top dut (.clk, .rst_n, .gate_gts(gate), .gate_hv(1'b0), .gate_cp(1'b0), .mc_tick,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .beam_off, .faults, .fault_evt, .dropped, .stage,
    .rec0, .rec0_valid, .rec0_ready(1'b1), .rec1, .rec1_valid, .rec1_ready(1'b1));

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  logic [2:0] gd;
  int bt_tb = 0, q_bt[$];
  always @(posedge clk) begin
    gd <= {gd[1:0], gate};
    if (mc_tick) begin if (rst_n) q_bt.push_back(bt_tb); bt_tb = gd[1] ? 1 : 0; end
    else if (gd[1]) bt_tb++;
  end

  always @(posedge clk) if (rst_n && rec0_valid) begin
    m_rec0++;
    checks++;
    if (rec0.cnt_a > rec0.max_a || rec0.cnt_a < rec0.min_a ||
        rec0.cnt_b > rec0.max_b || rec0.cnt_b < rec0.min_b) begin
      failures++;
      $display("FAIL pulse record st=%0d tc=%0d [%0d,%0d] tw=%0d [%0d,%0d]", rec0.stage,
               rec0.cnt_a, rec0.min_a, rec0.max_a, rec0.cnt_b, rec0.min_b, rec0.max_b);
    end
  end

  always @(posedge clk) if (rst_n && dut.u_cnt.mc_rdy) begin
    int e, d;
    e = q_bt.size() ? q_bt.pop_front() : -1;
    d = int'(dut.u_cnt.bt_last) - e;
    checks++;
    if (d > 2 || d < -2) begin failures++; $display("FAIL bt %0d expected %0d", dut.u_cnt.bt_last, e); end
  end

  always @(posedge clk) if (rst_n && rec1_valid) begin
    $display("MC %0d stage %0d: beam-on %0d clocks, expected [%0d,%0d]", rec1.cnt_b, rec1.stage,
             rec1.cnt_a, rec1.min_a, rec1.max_a);
  end

  always @(posedge clk) if (rst_n && dut.calc_mc) begin
    checks++;
    m_stage[stage]++;
    if (int'(stage) != gen_stage) begin failures++; $display("FAIL stage %0d generator %0d", stage, gen_stage); end
  end

  logic seen_fault = 0;
  always @(posedge clk) if (rst_n && faults != 0 && !seen_fault) begin
    seen_fault <= 1; failures++;
    $display("FAIL fault %b at stage %0d", faults, stage);
  end

  initial begin
    #22 rst_n = 1;
    for (int s = 0; s < 4; s++) wr(8'(A_STEP_BASE + 4 * s + 2), dur[s]);
    wr(A_TRANS_MC, dur[4]);
    @(posedge mc_tick);
    @(negedge clk); run = 1;
    wr(A_CTRL, 32'h1);
    wait (gen_stage == 6);
    repeat (2) @(posedge mc_tick);
    repeat (10) @(posedge clk);
    checks++; if (faults != 0 || beam_off) failures++;
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (m_stage[s] == 0) begin failures++; $display("FAIL stage %0d never reached", s); end
    end
    $display("pulses %0d records %0d extend %0d shrink %0d", n_pulses, m_rec0, n_extend, n_shrink);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
