// tb_fp_add: checks the single-precision adder against double-precision sums
// rounded to single precision. Exponents of the two operands stay within 20
// of each other so that the double sum is exact; cancellation, equal and
// opposite operands, zeros and wide exponent gaps are covered separately.
module tb_fp_add;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb;
    check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);   // 1+1
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1-1
    check(32'h0000_0000, 32'hC040_0000, 32'hC040_0000);   // 0+(-3)
    check(32'h4B80_0000, 32'h3F80_0000, 32'h4B80_0000);   // 2^24+1 rounds to even
    check(32'h4B80_0000, 32'h4000_0000, 32'h4B80_0001);   // 2^24+2
    check(32'h5000_0000, 32'h3F80_0000, 32'h5000_0000);   // wide gap
    check(32'h3F80_0001, 32'hBF80_0000, 32'h3400_0000);   // cancellation to 2^-23
    for (int i = 0; i < 30000; i++) begin
      ra = rand_float(-10, 10);
      rb = rand_float(-10, 10);
      check(ra, rb, r2f(f2r(ra) + f2r(rb)));
      // near-cancellation: same exponent, opposite sign
      rb = {~ra[31], ra[30:23], 23'($urandom)};
      check(ra, rb, r2f(f2r(ra) + f2r(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
