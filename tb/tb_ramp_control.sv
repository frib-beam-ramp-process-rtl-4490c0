// tb_ramp_control: self-checking test of ramp_control. Checks the reset
// values (the cold-start ramp settings), write/read-back of every
// configuration register, the stage sequence with per-step durations in
// MCs (changing only at MC ticks, first_mc on a change, step_time restarting,
// calc_mc one clock after each tick, return to IDLE when disabled), the
// fault-clear strobe, and the record ports: field packing, hand-off and
// the drop counter when a port is not ready.
module tb_ramp_control;
  import ramp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0, cfg_rdata;
  cfg_t cfg; logic [1:0] src_sel; logic clr_faults;
  logic mc_tick = 0; stage_e stage; logic [TIME_W-1:0] step_time; logic calc_mc, first_mc;
  logic [31:0] mc_index;
  logic tc_rdy = 0, mc_rdy = 0;
  logic [31:0] tc_last = 0, tw_last = 0, bt_last = 0;
  rec_t rec0, rec1; logic rec0_valid, rec1_valid, rec0_ready = 1, rec1_ready = 1;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ramp_control dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .src_sel,
    .clr_faults, .mc_tick, .stage, .step_time, .calc_mc, .first_mc, .mc_index,
    .tc_rdy, .tc_last, .tw_last, .tc_max_exp(32'd111), .tc_min_exp(32'd22), .tw_max_exp(32'd33),
    .tw_min_exp(32'd4), .la(LA_EXTEND), .mc_rdy, .bt_last, .bt_max_exp(32'd555),
    .bt_min_exp(32'd66), .faults(3'b010), .rec0, .rec0_valid, .rec0_ready, .rec1, .rec1_valid,
    .rec1_ready, .dropped);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic rd_chk(input logic [7:0] a, input logic [31:0] e);
    @(negedge clk); cfg_addr = a; #1;
    checks++;
    if (cfg_rdata !== e) begin failures++; $display("FAIL read %h = %0d expected %0d", a, cfg_rdata, e); end
  endtask

  task automatic tick_chk(input stage_e e_stage, input logic e_first);
    @(negedge clk); mc_tick = 1;
    @(negedge clk); mc_tick = 0;
    checks++;
    if (stage !== e_stage || calc_mc !== 1'b1 || first_mc !== e_first ||
        (e_first && step_time > 2)) begin
      failures++;
      $display("FAIL tick: stage %0d/%0d calc %0d first %0d/%0d time %0d", stage, e_stage, calc_mc,
               first_mc, e_first, step_time);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (calc_mc || stage !== e_stage) begin failures++; $display("FAIL between ticks"); end
  endtask

  initial begin
    logic [7:0] addrs [$];
    logic [31:0] v;
    #22 rst_n = 1;
    // reset values
    rd_chk(A_T_MC, 805000); rd_chk(A_NOTCH, 4025); rd_chk(A_PRF_CONST, 25000);
    rd_chk(A_STEP_BASE + 0, 2000); rd_chk(A_STEP_BASE + 1, 197120); rd_chk(A_STEP_BASE + 14, 39360);
    rd_chk(A_TOL_W, 10); rd_chk(A_CYC_STEP, 4000);
    // write / read back
    for (int i = 0; i < 16; i++) addrs.push_back(8'(A_STEP_BASE + i));
    addrs.push_back(A_PRF_CONST); addrs.push_back(A_PW_CONST); addrs.push_back(A_PW_START);
    addrs.push_back(A_TOL_F); addrs.push_back(A_TOL_W); addrs.push_back(A_CYC_STEP);
    addrs.push_back(A_T_MC); addrs.push_back(A_NOTCH); addrs.push_back(A_TRANS_MC);
    foreach (addrs[i]) begin
      v = $urandom;
      wr(addrs[i], v);
      rd_chk(addrs[i], v);
    end
    wr(A_ENV_FULL + 2, 32'd1234);
    checks++; if (cfg.env_full.tw_max != 1234) failures++;
    // durations 2, 1, 3, 2 MCs; transition 2
    wr(A_STEP_BASE + 2, 2); wr(A_STEP_BASE + 6, 1); wr(A_STEP_BASE + 10, 3); wr(A_STEP_BASE + 14, 2);
    wr(A_TRANS_MC, 2);
    tick_chk(ST_IDLE, 0);
    wr(A_CTRL, 32'h1 | (32'd2 << 2));
    checks++; if (src_sel != 2) failures++;
    rd_chk(A_CTRL, 32'h9);
    tick_chk(ST_STEP1, 1); tick_chk(ST_STEP1, 0);
    tick_chk(ST_STEP2, 1);
    tick_chk(ST_STEP3, 1); tick_chk(ST_STEP3, 0); tick_chk(ST_STEP3, 0);
    tick_chk(ST_STEP4, 1); tick_chk(ST_STEP4, 0);
    tick_chk(ST_TRANS, 1); tick_chk(ST_TRANS, 0);
    tick_chk(ST_FULL, 1); tick_chk(ST_FULL, 0); tick_chk(ST_FULL, 0);
    rd_chk(A_STATUS, {16'd0, 8'd0, 2'd0, 3'b010, ST_FULL});
    rd_chk(A_MC_COUNT, 13);
    // records
    @(negedge clk); tc_last = 700; tw_last = 30; tc_rdy = 1;
    @(negedge clk); tc_rdy = 0;
    checks++;
    if (!rec0_valid || rec0.cnt_a != 700 || rec0.cnt_b != 30 || rec0.max_a != 111 ||
        rec0.min_b != 4 || rec0.la != LA_EXTEND || rec0.faults != 3'b010 || rec0.stage != ST_FULL) begin
      failures++; $display("FAIL pulse record");
    end
    @(negedge clk); checks++; if (rec0_valid) begin failures++; $display("FAIL record not handed off"); end
    rec1_ready = 0;
    @(negedge clk); bt_last = 999; mc_rdy = 1;
    @(negedge clk); bt_last = 1; mc_rdy = 1;
    @(negedge clk); mc_rdy = 0;
    checks++;
    // the record belongs to the MC that ended: the 12th, at full power
    if (!rec1_valid || rec1.cnt_b != 12 || rec1.stage != ST_FULL || rec1.cnt_a != 999 || rec1.max_a != 555 || dropped != 1) begin
      failures++; $display("FAIL MC record / drop: cnt %0d dropped %0d", rec1.cnt_a, dropped);
    end
    rec1_ready = 1;
    // clear strobe and disable
    @(negedge clk); cfg_we = 1; cfg_addr = A_CTRL; cfg_wdata = 32'h2;
    @(negedge clk); cfg_we = 0; #1;
    checks++; if (!clr_faults) begin failures++; $display("FAIL clear strobe"); end
    @(negedge clk); #1;
    checks++; if (clr_faults) failures++;
    tick_chk(ST_IDLE, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
