// tb_fp_flt2fix: self-checking test of fp_flt2fix. Random positive values up
// to 2^31, small values around 0.5, negative values (must give 0) and a
// value above 2^32 (must saturate) are converted; the result must appear one
// clock later and equal the value rounded to the nearest integer.
module tb_fp_flt2fix;
  import tb_fp_util::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] a, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp_flt2fix dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a),
                  .out_valid(out_valid), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real r);
    logic [31:0] exp_y;
    real rv;
    a = r2f(r);
    rv = f2r(a);
    if (rv < 0.0)                exp_y = 0;
    else if (rv >= 4294967296.0) exp_y = 32'hFFFF_FFFF;
    else                         exp_y = 32'($floor(rv + 0.5));
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || y !== exp_y) begin
      failures++;
      $display("FAIL %f -> %0d expected %0d", rv, y, exp_y);
    end
  endtask

  initial begin
    a = 0;
    #22 rst_n = 1;
    @(posedge clk); #1;
    one(0.0); one(0.4); one(0.5); one(2.5); one(41846.3); one(-12.0); one(1.0e10);
    for (int i = 0; i < 300; i++)
      one(real'($urandom) * real'($urandom_range(1, 1000)) / 1000.0 / 2.0);
    for (int i = 0; i < 100; i++)
      one(real'($urandom_range(0, 100000)) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
