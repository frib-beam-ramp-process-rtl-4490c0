// tb_ramp_gen: behavioural model of the timing-system pulse generator used
// by the testbenches. It produces the machine-cycle (MC) tick every t_mc
// clocks and the beam gate of the cold-start ramp:
//   step 1    PRF = f0 + rate_f * t, PW = pw_const
//   steps 2-4 PRF = prf_const,       PW = w0[s] + rate_w[s] * t
//   transition 25 kHz / 12.5 kHz pulses alternate (PW ~98.5 %)
//   full power one pulse filling the MC after the notch
// t is the time since the step began; no pulse starts in the notch. With
// grid set, step 1 cycles are whole multiples of grid (40 us gives PRFs of
// 25 kHz / n), mixed from pulse to pulse so that the mean PRF follows the
// linear ramp. Near
// the MC end the pulse that fits once but not twice is stretched to the MC
// end with its PW scaled by the same ratio (in every other MC; in the
// others it keeps its cycle), and one that does not fit runs
// to the MC end, its PW cut to the start PW if it would reach into the
// time reserved for the notch. The stage advances after dur[] MCs once
// run is set. Injection requests make the next pulse twice as wide
// (inj_pw), its cycle a third as long (inj_cyc) or drop the pulses of the
// next MC after its first quarter (inj_bt).
module tb_ramp_gen #(
  parameter int CLK = 80_500_000
) (
  input  logic clk,
  input  logic run,
  input  int   t_mc,
  input  int   notch,
  input  int   f0,
  input  int   rate_f_q8,
  input  int   grid,        // step 1 cycle grid in clocks, 0 for none
  input  int   pw_const,
  input  int   prf_const,
  input  int   pw_start,
  input  int   w0        [3],
  input  int   rate_w_q8 [3],
  input  int   dur       [5],
  input  logic inj_pw,
  input  logic inj_cyc,
  input  logic inj_bt,
  output logic gate,
  output logic mc_tick,
  output int   gen_stage,
  output int   n_extend,
  output int   n_shrink,
  output int   n_pulses
);
  longint step_start = 0, now = 0;
  int mc_in_stage = 0;
  logic pend_pw = 0, pend_cyc = 0, pend_bt = 0;

  initial begin gate = 0; mc_tick = 0; gen_stage = 0; n_extend = 0; n_shrink = 0; n_pulses = 0; end
  always @(posedge clk) now <= now + 1;
  always @(posedge clk) begin
    if (inj_pw)  pend_pw  <= 1;
    if (inj_cyc) pend_cyc <= 1;
    if (inj_bt)  pend_bt  <= 1;
  end

  task automatic hold(input int n, input logic v);
    for (int i = 0; i < n; i++) begin gate = v; @(negedge clk); mc_tick = 0; end
  endtask

  initial begin
    int tau, left, c, w, c0;
    logic alt;
    real ts, f, qerr;
    logic drop;
    @(negedge clk);
    forever begin
      // ---- MC start ----
      if (gen_stage == 0) begin
        if (run) begin gen_stage = 1; mc_in_stage = 0; step_start = now; end
      end else if (gen_stage < 6 && mc_in_stage + 1 >= dur[gen_stage - 1]) begin
        gen_stage++; mc_in_stage = 0; step_start = now;
      end else begin
        mc_in_stage++;
      end
      drop = pend_bt; pend_bt = 0;
      mc_tick = 1;
      tau = notch;
      hold(notch, 0);
      alt = 0;
      qerr = 0.0;
      while (tau < t_mc) begin
        left = t_mc - tau;
        ts = real'(now - step_start) / real'(CLK);
        if (gen_stage == 0) begin
          hold(left, 0); tau += left; continue;
        end
        if (gen_stage == 6) begin
          hold(left, 1); tau += left; n_pulses++; continue;
        end
        if (gen_stage == 5) begin
          c0 = alt ? 6440 : 3220; w = alt ? 6360 : 3172; alt = !alt;
        end else if (gen_stage == 1) begin
          f  = real'(f0) + real'(rate_f_q8) / 256.0 * ts;
          c0 = int'(real'(CLK) / f);
          w  = pw_const;
        end else begin
          c0 = CLK / prf_const;
          w  = int'(real'(w0[gen_stage - 2]) + real'(rate_w_q8[gen_stage - 2]) / 256.0 * ts);
        end
        c = c0;
        if (left - notch >= 2 * c0) begin
          c = c0;
          if (gen_stage == 1 && grid > 0) begin
            // cycles are whole multiples of the grid; the rounding error is
            // carried to the next pulse so the mean PRF follows the ramp
            c = grid * int'((real'(c0) + qerr) / real'(grid));
            if (c < grid) c = grid;
            if (c > left) c = left;
            qerr = qerr + real'(c0 - c);
          end
        end else if (left - notch >= c0 && mc_in_stage % 2 == 0) begin
          c = left; w = int'(longint'(w) * left / c0); n_extend++;
        end else if (left - notch >= c0) begin
          c = c0;
        end else begin
          c = left; n_shrink++;
          if (w > left - notch) w = pw_start;
        end
        if (pend_pw)  begin w = 2 * w + 50; pend_pw = 0; end
        if (pend_cyc) begin c = c / 3; pend_cyc = 0; end
        if (w >= c) w = c - 2;
        if (drop && tau > t_mc / 4) begin
          hold(c, 0);
        end else begin
          n_pulses++;
          hold(w, 1);
          hold(c - w, 0);
        end
        tau += c;
      end
    end
  end
endmodule
