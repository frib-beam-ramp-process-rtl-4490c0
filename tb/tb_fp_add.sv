// tb_fp_add: self-checking test of fp_add. Random operands over 40 binary
// decades are applied one per clock; each result must appear exactly one
// clock later (latency check through out_valid) and agree within one unit
// in the last place with the double-precision reference truncated to
// single precision.
module tb_fp_add;
  import tb_fp_util::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp_add dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .sub(sub), .a(a), .b(b),
              .out_valid(out_valid), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real ra, input real rb);
    logic [31:0] exp_y;
    a = r2f(ra); b = r2f(rb);
    ra = f2r(a); rb = f2r(b);
    sub = 1'($urandom_range(0,1));
    in_valid = 1;
    exp_y = r2f(sub ? (ra - rb) : (ra + rb));
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || ulp_diff(y, exp_y) > 1) begin
      failures++;
      $display("FAIL %f %f -> %h expected %h valid=%0d", ra, rb, y, exp_y, out_valid);
    end
  endtask

  initial begin
    sub = 0;
    a = 0; b = 0;
    #22 rst_n = 1;
    @(posedge clk); #1;
    one(80500000.0, 770.0);
    one(2000.0, 100.0);
    one(49.0, 3.0);
    one(40250.0, 38640.0);
    for (int i = 0; i < 500; i++) one(rnd_real(), rnd_real());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
