// range_checker: tolerance-envelope check of one counter (PW, pulse cycle or
// machine-cycle beam-on time).
//
// While the counter runs (active) the running count is compared with the
// expected maximum; a count above it raises the fault one clock later,
// without waiting for the done strobe. When done pulses, the final count
// is compared with the expected minimum and a count below it raises the
// fault one clock later. Both checks are made only while exp_valid says the
// envelope belongs to the measurement in progress. fault is sticky until
// clr; fault_evt pulses for one clock on each detection; over/under tell
// which bound was crossed. This follows the checker behaviour the design
// describes (max checked before done, min checked at done); the sticky
// fault and the clear input are this design's choice.
module range_checker
  import ramp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             exp_valid,
  input  logic             active,
  input  logic [CNT_W-1:0] count,       // running count
  input  logic             done,
  input  logic [CNT_W-1:0] done_count,  // final count, valid with done
  input  logic [CNT_W-1:0] max_exp,
  input  logic [CNT_W-1:0] min_exp,
  output logic             fault,
  output logic             fault_evt,
  output logic             over,
  output logic             under
);

  logic hit_over, hit_under;

  assign hit_over  = exp_valid && active && (count > max_exp);
  assign hit_under = exp_valid && done && (done_count < min_exp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault     <= 1'b0;
      fault_evt <= 1'b0;
      over      <= 1'b0;
      under     <= 1'b0;
    end else begin
      fault_evt <= hit_over || hit_under;
      if (clr) begin
        fault <= 1'b0;
        over  <= 1'b0;
        under <= 1'b0;
      end else begin
        if (hit_over)  begin fault <= 1'b1; over  <= 1'b1; end
        if (hit_under) begin fault <= 1'b1; under <= 1'b1; end
      end
    end
  end

endmodule
