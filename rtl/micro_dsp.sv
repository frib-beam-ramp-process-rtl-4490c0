// micro_dsp: floating-point calculator of the expected cycle and PW range of
// the next pulse (micro checker DSP).
//
// On start it runs a fixed 25-instruction program on one fixed-to-float
// converter, one adder/subtractor, one multiplier, one divider and one
// float-to-fixed converter, all single precision with one clock latency:
//   base = init + rate * step_time / 80.5e6                     (Eq. 1)
//   F, W = (base, hold) in the PRF ramp step, (hold, base) otherwise
//   cmin = 80.5e6 / (F + tol_f),  cmax = 80.5e6 / (F - tol_f)   (Eq. 2)
//   pwmax1 = W * cmax / cmin                                    (Eq. 3)
//   pwmax2 = W * left / cmin   (cycle extended to 'left')       (Eq. 4)
//   pwmin  = W * cmin / cmax                                    (Eq. 5)
// Each instruction takes two clocks (issue, write back), so results are
// ready 52 clocks (0.65 us at 80.5 MHz) after start; done pulses for one
// clock and the outputs hold until the next run. start is ignored while
// busy. Inputs must be stable from start to done.
// The equations, the operator set and the fixed-to-float conversion of
// cycle time, rate and initial value follow the design. The PRF tolerance
// turning one PRF into a max and min cycle, the use of the step's start
// value in Eq. 1 and the sequential issue order are this design's choices.
module micro_dsp
  import ramp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              freq_mode,  // 1: PRF ramps (step 1), 0: PW ramps
  input  logic [TIME_W-1:0] step_time,  // clocks since the step began
  input  logic [31:0]       rate,       // Hz/s or counts/s, RATE_FRAC fraction bits
  input  logic [31:0]       init,       // start PRF (Hz) or start PW (counts)
  input  logic [31:0]       hold,       // PW (counts) in step 1, PRF (Hz) otherwise
  input  logic [31:0]       tol_f,      // PRF tolerance in Hz
  input  logic [31:0]       left,       // extended cycle for Eq. 4, counts
  output logic              busy,
  output logic              done,
  output logic [CNT_W-1:0]  cmax,
  output logic [CNT_W-1:0]  cmin,
  output logic [CNT_W-1:0]  pwmax1,
  output logic [CNT_W-1:0]  pwmax2,
  output logic [CNT_W-1:0]  pwmin
);

  typedef enum logic [2:0] {OP_CVT, OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_F2I, OP_END} op_e;

  // register file slots; R_F and R_W are resolved through freq_mode
  typedef enum logic [4:0] {
    R_T, R_R, R_K, R_I, R_H, R_TF, R_L, R_P, R_Q, R_B, R_FX, R_FN,
    R_CN, R_CX, R_RA, R_RB, R_RC, R_M1, R_MN, R_M2, R_F, R_W
  } reg_e;

  typedef struct packed {
    op_e        op;
    reg_e       dst;   // OP_CVT: destination; OP_F2I: output index
    reg_e       a;     // OP_CVT: source index
    reg_e       b;
  } instr_t;

  localparam int unsigned N_REGS = 20;

  function automatic instr_t prog(input logic [4:0] pc);
    case (pc)
      5'd0:  return '{OP_CVT, R_T,  R_T,  R_T};
      5'd1:  return '{OP_CVT, R_R,  R_R,  R_T};
      5'd2:  return '{OP_CVT, R_K,  R_K,  R_T};
      5'd3:  return '{OP_CVT, R_I,  R_I,  R_T};
      5'd4:  return '{OP_CVT, R_H,  R_H,  R_T};
      5'd5:  return '{OP_CVT, R_TF, R_TF, R_T};
      5'd6:  return '{OP_CVT, R_L,  R_L,  R_T};
      5'd7:  return '{OP_MUL, R_P,  R_R,  R_T};   // rate * time
      5'd8:  return '{OP_DIV, R_Q,  R_P,  R_K};   // / 80.5e6
      5'd9:  return '{OP_ADD, R_B,  R_I,  R_Q};   // Eq. 1
      5'd10: return '{OP_ADD, R_FX, R_F,  R_TF};
      5'd11: return '{OP_SUB, R_FN, R_F,  R_TF};
      5'd12: return '{OP_DIV, R_CN, R_K,  R_FX};  // Eq. 2, min cycle
      5'd13: return '{OP_DIV, R_CX, R_K,  R_FN};  // Eq. 2, max cycle
      5'd14: return '{OP_DIV, R_RA, R_CX, R_CN};
      5'd15: return '{OP_DIV, R_RB, R_CN, R_CX};
      5'd16: return '{OP_DIV, R_RC, R_L,  R_CN};
      5'd17: return '{OP_MUL, R_M1, R_W,  R_RA};  // Eq. 3
      5'd18: return '{OP_MUL, R_MN, R_W,  R_RB};  // Eq. 5
      5'd19: return '{OP_MUL, R_M2, R_W,  R_RC};  // Eq. 4
      5'd20: return '{OP_F2I, reg_e'(0), R_CX, R_T};
      5'd21: return '{OP_F2I, reg_e'(1), R_CN, R_T};
      5'd22: return '{OP_F2I, reg_e'(2), R_M1, R_T};
      5'd23: return '{OP_F2I, reg_e'(3), R_M2, R_T};
      5'd24: return '{OP_F2I, reg_e'(4), R_MN, R_T};
      default: return '{OP_END, R_T, R_T, R_T};
    endcase
  endfunction

  fp32_t       rf [N_REGS];
  logic [4:0]  pc;
  logic        phase;          // 0 issue, 1 write back
  instr_t      ins;
  fp32_t       opa, opb;

  function automatic reg_e resolve(input reg_e r, input logic fm);
    if (r == R_F) return fm ? R_B : R_H;
    if (r == R_W) return fm ? R_H : R_B;
    return r;
  endfunction

  assign ins = prog(pc);
  assign opa = rf[resolve(ins.a, freq_mode)];
  assign opb = rf[resolve(ins.b, freq_mode)];

  // fixed-to-float source select
  logic [47:0] cvt_x;
  logic [5:0]  cvt_frac;
  always_comb begin
    cvt_frac = 6'd0;
    unique case (ins.a)
      R_T:     cvt_x = 48'(step_time);
      R_R:     begin cvt_x = 48'(rate); cvt_frac = 6'(RATE_FRAC); end
      R_K:     cvt_x = 48'(CLK_HZ);
      R_I:     cvt_x = 48'(init);
      R_H:     cvt_x = 48'(hold);
      R_TF:    cvt_x = 48'(tol_f);
      default: cvt_x = 48'(left);
    endcase
  end

  logic  issue;
  logic  v_cvt, v_add, v_mul, v_div, v_f2i;
  fp32_t y_cvt, y_add, y_mul, y_div;
  logic [31:0] y_f2i;

  assign issue = busy && !phase;

  fp_fix2flt #(.IN_W(48)) u_cvt (.clk, .rst_n, .in_valid(issue && ins.op == OP_CVT),
    .x(cvt_x), .frac(cvt_frac), .out_valid(v_cvt), .y(y_cvt));
  fp_add u_add (.clk, .rst_n, .in_valid(issue && (ins.op == OP_ADD || ins.op == OP_SUB)),
    .sub(ins.op == OP_SUB), .a(opa), .b(opb), .out_valid(v_add), .y(y_add));
  fp_mul u_mul (.clk, .rst_n, .in_valid(issue && ins.op == OP_MUL),
    .a(opa), .b(opb), .out_valid(v_mul), .y(y_mul));
  fp_div u_div (.clk, .rst_n, .in_valid(issue && ins.op == OP_DIV),
    .a(opa), .b(opb), .out_valid(v_div), .y(y_div));
  fp_flt2fix u_f2i (.clk, .rst_n, .in_valid(issue && ins.op == OP_F2I),
    .a(opa), .out_valid(v_f2i), .y(y_f2i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; pc <= '0; phase <= 1'b0;
      cmax <= '0; cmin <= '0; pwmax1 <= '0; pwmax2 <= '0; pwmin <= '0;
      for (int i = 0; i < int'(N_REGS); i++) rf[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; pc <= '0; phase <= 1'b0;
        end
      end else if (!phase) begin
        if (ins.op == OP_END) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          phase <= 1'b1;
        end
      end else begin
        phase <= 1'b0;
        pc    <= pc + 1'b1;
        if (v_cvt) rf[ins.dst] <= y_cvt;
        if (v_add) rf[ins.dst] <= y_add;
        if (v_mul) rf[ins.dst] <= y_mul;
        if (v_div) rf[ins.dst] <= y_div;
        if (v_f2i) begin
          unique case (ins.dst)
            reg_e'(0): cmax   <= y_f2i;
            reg_e'(1): cmin   <= y_f2i;
            reg_e'(2): pwmax1 <= y_f2i;
            reg_e'(3): pwmax2 <= y_f2i;
            default:   pwmin  <= y_f2i;
          endcase
        end
      end
    end
  end

endmodule
