// tb_fp_fix2flt: self-checking test of fp_fix2flt. Random unsigned values of
// random length and a random number of fraction bits are converted; the
// result must appear one clock later and equal x / 2^frac truncated to
// single precision, computed through the simulator's real type.
module tb_fp_fix2flt;
  import tb_fp_util::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [47:0] x;
  logic [5:0] frac;
  logic [31:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp_fix2flt #(.IN_W(48)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                               .frac(frac), .out_valid(out_valid), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [47:0] xv, input logic [5:0] fv);
    logic [31:0] exp_y;
    x = xv; frac = fv; in_valid = 1;
    exp_y = r2f(real'(xv) / (2.0 ** fv));
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || y !== exp_y) begin
      failures++;
      $display("FAIL x=%0d frac=%0d -> %h expected %h", xv, fv, y, exp_y);
    end
  endtask

  initial begin
    x = 0; frac = 0;
    #22 rst_n = 1;
    @(posedge clk); #1;
    one(48'd0, 6'd0);
    one(48'd1, 6'd0);
    one(48'd80500000, 6'd0);
    one(48'd197120, 6'd8);           // 770 Hz/s in Q.8
    one(48'hFFFF_FFFF_FFFF, 6'd0);
    for (int i = 0; i < 500; i++)
      one({$urandom, $urandom} >> $urandom_range(0, 63), 6'($urandom_range(0, 8)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
