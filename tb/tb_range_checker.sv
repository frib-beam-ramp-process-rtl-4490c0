// tb_range_checker: self-checking test of range_checker. Random counts,
// bounds and strobes are applied; a reference model predicts fault_evt one
// clock later (above max while active, below min at done, both only with
// exp_valid) and the sticky fault with its clear.
module tb_range_checker;
  logic clk = 0, rst_n = 0, clr = 0, exp_valid = 0, active = 0, done = 0;
  logic [31:0] count = 0, done_count = 0, max_exp = 0, min_exp = 0;
  logic fault, fault_evt, over, under;
  int checks = 0, failures = 0;
  logic exp_evt, exp_fault, exp_over, exp_under;
  int n_over = 0, n_under = 0;
  always #5 clk = ~clk;

  range_checker dut (.clk, .rst_n, .clr, .exp_valid, .active, .count, .done, .done_count,
                     .max_exp, .min_exp, .fault, .fault_evt, .over, .under);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ho, hu;
    exp_fault = 0; exp_over = 0; exp_under = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      exp_valid  = ($urandom_range(0, 9) != 0);
      active     = $urandom_range(0, 1);
      done       = ($urandom_range(0, 5) == 0);
      clr        = ($urandom_range(0, 30) == 0);
      max_exp    = $urandom_range(100, 200);
      min_exp    = $urandom_range(50, 150);
      count      = $urandom_range(0, 210);
      done_count = $urandom_range(30, 210);
      ho = exp_valid && active && (count > max_exp);
      hu = exp_valid && done && (done_count < min_exp);
      n_over += int'(ho); n_under += int'(hu);
      @(posedge clk); #1;
      if (clr) begin exp_fault = 0; exp_over = 0; exp_under = 0; end
      else begin
        if (ho) begin exp_fault = 1; exp_over = 1; end
        if (hu) begin exp_fault = 1; exp_under = 1; end
      end
      checks++;
      if (fault_evt !== (ho || hu) || fault !== exp_fault || over !== exp_over ||
          under !== exp_under) begin
        failures++;
        $display("FAIL step %0d evt=%0d/%0d fault=%0d/%0d", i, fault_evt, ho || hu, fault, exp_fault);
      end
    end
    checks++;
    if (n_over == 0 || n_under == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
