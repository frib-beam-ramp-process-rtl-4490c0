// tb_pulse_counter: self-checking test of pulse_counter. Random gate pulses
// (3-40 clocks high, 3-60 low) drive the selected source, with MC ticks
// placed inside low periods. Expected PW, cycle (rise to rise, or rise to
// tick minus the 2-clock synchroniser delay) and per-MC beam-on totals are
// queued as the stimulus is made and compared, in order, with tw_last,
// tc_last and bt_last at their strobes. Sources 1 and 2 are used too while
// the others carry noise.
module tb_pulse_counter;
  import ramp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic gate_gts = 0, gate_hv = 0, gate_cp = 0, mc_tick = 0;
  logic [1:0] src_sel = 0;
  logic gate, pulse_start, tw_active, tw_rdy, tc_active, tc_rdy, mc_rdy;
  logic [31:0] tw_count, tw_last, tc_count, tc_last, bt_count, bt_last, mc_time;
  int checks = 0, failures = 0;
  int q_tw[$], q_tc[$], q_bt[$];
  int n_tick_cyc = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pulse_counter dut (.clk, .rst_n, .gate_gts, .gate_hv, .gate_cp, .src_sel, .mc_tick,
    .gate, .pulse_start, .tw_count, .tw_active, .tw_rdy, .tw_last, .tc_count, .tc_active,
    .tc_rdy, .tc_last, .bt_count, .mc_rdy, .bt_last, .mc_time);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare strobes with the queues
  always @(posedge clk) if (rst_n) begin
    if (tw_rdy) begin
      checks++;
      if (q_tw.size() == 0 || tw_last != q_tw[0]) begin
        failures++; $display("FAIL tw %0d exp %0d", tw_last, q_tw.size() ? q_tw[0] : -1);
      end
      if (q_tw.size()) void'(q_tw.pop_front());
    end
    if (tc_rdy) begin
      checks++;
      if (q_tc.size() == 0 || tc_last != q_tc[0]) begin
        failures++; $display("FAIL tc %0d exp %0d", tc_last, q_tc.size() ? q_tc[0] : -1);
      end
      if (q_tc.size()) void'(q_tc.pop_front());
    end
    if (mc_rdy) begin
      checks++;
      if (q_bt.size() == 0 || bt_last != q_bt[0]) begin
        failures++; $display("FAIL bt %0d exp %0d", bt_last, q_bt.size() ? q_bt[0] : -1);
      end
      if (q_bt.size()) void'(q_bt.pop_front());
      if (mc_time != 0) begin checks++; failures++; end
    end
  end

  task automatic drive(input logic v);
    gate_gts = (src_sel == 0) ? v : 1'($urandom_range(0, 1));
    gate_hv  = (src_sel == 1) ? v : 1'($urandom_range(0, 1));
    gate_cp  = (src_sel >= 2) ? v : 1'($urandom_range(0, 1));
  endtask

  initial begin
    longint rise_c, last_rise;
    logic active;
    int bt_acc, h, l;
    active = 0; bt_acc = 0; last_rise = 0;
    drive(0);
    #22 rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      @(negedge clk);
      src_sel = 2'(blk);
      drive(0);
      repeat (10) @(negedge clk);
      // a tick to start from a known MC boundary
      mc_tick = 1; @(negedge clk); mc_tick = 0;
      if (active) begin q_tc.push_back(int'(cyc - 1 - last_rise - 2)); active = 0; end
      q_bt.push_back(bt_acc); bt_acc = 0;
      for (int p = 0; p < 300; p++) begin
        h = $urandom_range(3, 40);
        l = $urandom_range(3, 60);
        rise_c = cyc;                       // edge at which the DUT first samples 1
        if (active) q_tc.push_back(int'(rise_c - last_rise));
        active = 1; last_rise = rise_c;
        q_tw.push_back(h); bt_acc += h;
        for (int i = 0; i < h; i++) begin drive(1); @(negedge clk); end
        for (int i = 0; i < l; i++) begin
          drive(0);
          if (l >= 12 && i == 6 && $urandom_range(0, 3) == 0) begin
            mc_tick = 1;
            q_tc.push_back(int'(cyc - last_rise - 2)); active = 0;
            q_bt.push_back(bt_acc); bt_acc = 0;
            n_tick_cyc++;
          end
          @(negedge clk);
          mc_tick = 0;
        end
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (q_tw.size() != 0 || q_bt.size() != 0 || n_tick_cyc == 0) begin
      failures++; $display("FAIL leftovers tw=%0d bt=%0d", q_tw.size(), q_bt.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
