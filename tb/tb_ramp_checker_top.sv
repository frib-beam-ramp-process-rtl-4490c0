// tb_ramp_checker_top: end-to-end test of the ramp process checker.
//
// A behavioural pulse generator (tb_ramp_gen) plays a shortened cold-start
// ramp with a 1 ms machine cycle (MC) and accelerated rates: IDLE, step 1
// (PRF 10 -> 25 kHz), steps 2-4 (PW ramps), the transition period and full
// power. The checker is configured through its register port to the same
// schedule. Checked:
//  * the checker's stage follows the generator's at every MC;
//  * no fault while the ramp is clean; every pulse record's counts lie in
//    the envelope it was checked against;
//  * every MC record's beam-on count matches the gate-high clocks the
//    testbench counted itself (within 2 clocks);
//  * an over-wide pulse trips tw before the pulse ends, a shortened cycle
//    trips tc, missing pulses trip bt, each raising beam_off, and a clear
//    through the register port resets them;
//  * look-ahead extend and shrink decisions both occur, a stalled DDR3 port
//    drops records and counts them, register read-back works.
// Each mechanism is counted; one that never happens is a failure.
module tb_ramp_checker_top;
  import ramp_pkg::*;
  localparam int TMC = 80500, NOTCH = 4025;
  logic clk = 0, rst_n = 0;
  logic gate, mc_tick;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic beam_off; logic [2:0] faults, fault_evt; stage_e stage; logic [15:0] dropped;
  rec_t rec0, rec1; logic rec0_valid, rec1_valid, rec0_ready = 1, rec1_ready = 1;
  logic run = 0, inj_pw = 0, inj_cyc = 0, inj_bt = 0;
  int gen_stage, n_extend, n_shrink, n_pulses;
  int checks = 0, failures = 0;
  int w0[3] = '{49, 403, 1610};
  int rw[3] = '{256 * 40000, 256 * 60000, 256 * 60000};
  int dur[5] = '{5, 4, 3, 4, 3};
  // mechanism counters
  int m_stage[7] = '{0, 0, 0, 0, 0, 0, 0};
  int m_la_ext = 0, m_la_shr = 0, m_tw = 0, m_tc = 0, m_bt = 0, m_clear = 0, m_drop = 0;
  int m_tw_early = 0, m_rec0 = 0, m_rec1 = 0, m_beam_off = 0;
  logic expect_clean = 1;
  always #5 clk = ~clk;

  tb_ramp_gen gen (.clk, .run, .t_mc(TMC), .notch(NOTCH), .f0(10000), .rate_f_q8(256 * 3000000), .grid(0),
    .pw_const(49), .prf_const(25000), .pw_start(49), .w0, .rate_w_q8(rw), .dur,
    .inj_pw, .inj_cyc, .inj_bt, .gate, .mc_tick, .gen_stage, .n_extend, .n_shrink, .n_pulses);

  ramp_checker_top dut (.clk, .rst_n, .gate_gts(gate), .gate_hv(1'b0), .gate_cp(1'b0), .mc_tick,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .beam_off, .faults, .fault_evt, .dropped, .stage,
    .rec0, .rec0_valid, .rec0_ready, .rec1, .rec1_valid, .rec1_ready);

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic wait_mc(input int n);
    repeat (n) @(posedge mc_tick);
  endtask

  // ---- independent beam-on count per MC (gate delayed by the 2-clock synchroniser) ----
  logic [2:0] gd;
  int bt_tb = 0, q_bt[$];
  always @(posedge clk) begin
    gd <= {gd[1:0], gate};
    if (mc_tick) begin if (rst_n) q_bt.push_back(bt_tb); bt_tb = gd[1] ? 1 : 0; end
    else if (gd[1]) bt_tb++;
  end

  // ---- record streams ----
  always @(posedge clk) if (rst_n) begin
    if (rec0_valid && rec0_ready) begin
      m_rec0++;
      if (rec0.la == LA_EXTEND) m_la_ext++;
      if (rec0.la == LA_SHRINK) m_la_shr++;
      if (expect_clean && rec0.stage != ST_IDLE) begin
        checks++;
        if (rec0.cnt_a > rec0.max_a || rec0.cnt_a < rec0.min_a ||
            rec0.cnt_b > rec0.max_b || rec0.cnt_b < rec0.min_b) begin
          failures++;
          $display("FAIL pulse record out of envelope st=%0d tc=%0d [%0d,%0d] tw=%0d [%0d,%0d]",
                   rec0.stage, rec0.cnt_a, rec0.min_a, rec0.max_a, rec0.cnt_b, rec0.min_b, rec0.max_b);
        end
      end
    end
    if (rec1_valid && rec1_ready) begin
      m_rec1++;
    end
  end

  // MC records are produced one clock after the MC tick; compare with the tb count
  always @(posedge clk) if (rst_n && dut.u_cnt.mc_rdy) begin
    int e, d;
    e = q_bt.size() ? q_bt.pop_front() : -1;
    d = int'(dut.u_cnt.bt_last) - e;
    checks++;
    if (d > 2 || d < -2) begin
      failures++; $display("FAIL bt count %0d expected %0d", dut.u_cnt.bt_last, e);
    end
    if (!expect_clean) $display("MC end stage %0d bt %0d range [%0d,%0d] valid %0d", stage, dut.u_cnt.bt_last, dut.bt_min_exp, dut.bt_max_exp, dut.u_macro.exp_valid);
  end

  // stage follows the generator
  always @(posedge clk) if (rst_n && dut.calc_mc) begin
    checks++;
    m_stage[stage]++;
    if (int'(stage) != gen_stage) begin
      failures++; $display("FAIL stage %0d generator %0d", stage, gen_stage);
    end
  end

  // unexpected faults during the clean part
  always @(posedge clk) if (rst_n && expect_clean && faults != 0) begin
    checks++; failures++;
    $display("FAIL unexpected fault %b at stage %0d (tc %0d [%0d,%0d] tw %0d [%0d,%0d] bt [%0d,%0d])",
      faults, stage, dut.u_cnt.tc_count, dut.tc_min_exp, dut.tc_max_exp, dut.u_cnt.tw_count,
      dut.tw_min_exp, dut.tw_max_exp, dut.bt_min_exp, dut.bt_max_exp);
    expect_clean = 0;
  end

  // beam_off is the registered OR of the sticky faults
  logic any_fault_d = 0;
  always @(posedge clk) begin
    any_fault_d <= |faults;
    if (beam_off) m_beam_off++;
    if (rst_n && beam_off !== any_fault_d) begin
      checks++; failures++; $display("FAIL beam_off %0d faults %b", beam_off, faults);
    end
  end

  task automatic expect_fault(input int bit_i, input string name, input int timeout_mc);
    int n;
    n = 0;
    while (!faults[bit_i] && n < timeout_mc * TMC) begin @(posedge clk); n++; end
    checks++;
    if (!faults[bit_i]) begin failures++; $display("FAIL %s fault not raised", name); end
    else $display("%s fault raised at stage %0d", name, stage);
    repeat (3) @(posedge clk);
    checks++;
    if (!beam_off) begin failures++; $display("FAIL beam_off not raised"); end
    // clear through the register port
    wr(A_CTRL, 32'h3);
    repeat (2) @(posedge clk);
    checks++;
    if (faults != 0) begin failures++; $display("FAIL clear: faults=%b", faults); end
    else m_clear++;
  endtask

  initial begin
    #22 rst_n = 1;
    // configuration of the shortened ramp
    wr(A_T_MC, TMC);
    wr(A_NOTCH, NOTCH);
    wr(A_CYC_STEP, 1000);
    wr(A_STEP_BASE + 0, 10000); wr(A_STEP_BASE + 1, 256 * 3000000); wr(A_STEP_BASE + 2, dur[0]);
    wr(A_STEP_BASE + 3, 300000);
    for (int s = 0; s < 3; s++) begin
      wr(8'(A_STEP_BASE + 4 * (s + 1) + 0), w0[s]);
      wr(8'(A_STEP_BASE + 4 * (s + 1) + 1), rw[s]);
      wr(8'(A_STEP_BASE + 4 * (s + 1) + 2), dur[s + 1]);
    end
    wr(A_STEP_BASE + 7, 3_000_000); wr(A_STEP_BASE + 11, 6_000_000); wr(A_STEP_BASE + 15, 12_000_000);
    wr(A_TRANS_MC, dur[4]);
    wr(A_ENV_TRANS + 0, 20000); wr(A_ENV_TRANS + 1, 0); wr(A_ENV_TRANS + 2, 20000); wr(A_ENV_TRANS + 3, 0);
    wr(A_ENV_FULL + 0, TMC); wr(A_ENV_FULL + 1, TMC - NOTCH - 100);
    wr(A_ENV_FULL + 2, TMC - NOTCH + 100); wr(A_ENV_FULL + 3, TMC - NOTCH - 100);
    @(negedge clk); cfg_addr = A_T_MC; #1;
    checks++; if (cfg_rdata != TMC) begin failures++; $display("FAIL readback %0d", cfg_rdata); end
    // start the ramp on both sides
    wait_mc(2);
    @(negedge clk); run = 1;
    wr(A_CTRL, 32'h1);
    // clean ramp through steps 1 to 3
    wait (gen_stage == 3);
    wait_mc(1);
    // DDR3 port stalls for a while
    @(negedge clk); rec0_ready = 0;
    repeat (20000) @(negedge clk);
    rec0_ready = 1;
    checks++;
    if (dropped != 0) m_drop++; else begin failures++; $display("FAIL no record dropped"); end
    expect_clean = 0;
    // over-wide pulse: tw must trip while the pulse is still high
    @(negedge clk); inj_pw = 1; @(negedge clk); inj_pw = 0;
    fork
      begin : watch_tw
        @(posedge fault_evt[0]);
        if (dut.u_cnt.tw_active) m_tw_early++;
      end
      expect_fault(0, "tw", 2);
    join
    m_tw++;
    wait (gen_stage == 4);
    @(negedge clk); inj_cyc = 1; @(negedge clk); inj_cyc = 0;
    expect_fault(1, "tc", 2);
    m_tc++;
    wait_mc(1);
    @(negedge clk); inj_bt = 1; @(negedge clk); inj_bt = 0;
    expect_fault(2, "bt", 3);
    m_bt++;
    // run out through the transition to full power, clean again
    wait (gen_stage == 6);
    wait_mc(1);
    wr(A_CTRL, 32'h3);
    repeat (10) @(posedge clk);
    expect_clean = 1;
    wait_mc(3);
    // mechanism coverage
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (m_stage[s] == 0) begin failures++; $display("FAIL stage %0d never reached", s); end
    end
    checks++; if (m_la_ext == 0) begin failures++; $display("FAIL no extend decision"); end
    checks++; if (m_la_shr == 0) begin failures++; $display("FAIL no shrink decision"); end
    checks++; if (m_tw_early == 0) begin failures++; $display("FAIL tw not raised before pulse end"); end
    checks++; if (m_clear < 3) begin failures++; $display("FAIL clears %0d", m_clear); end
    checks++; if (m_rec1 == 0 || m_rec0 == 0) begin failures++; $display("FAIL no records"); end
    $display("mechanisms: stages %0d %0d %0d %0d %0d %0d, extend %0d shrink %0d, tw %0d (early %0d) tc %0d bt %0d, clears %0d, drop %0d (%0d records), beam_off clocks %0d, records %0d/%0d, pulses %0d",
      m_stage[1], m_stage[2], m_stage[3], m_stage[4], m_stage[5], m_stage[6], m_la_ext, m_la_shr,
      m_tw, m_tw_early, m_tc, m_bt, m_clear, m_drop, dropped, m_beam_off, m_rec0, m_rec1, n_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
