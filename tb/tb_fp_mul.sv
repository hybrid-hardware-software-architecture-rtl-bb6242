// tb_fp_mul: checks the single-precision multiplier against double-precision
// products rounded to single precision, on random operands and on zero,
// overflow and underflow cases.
module tb_fp_mul;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb;
    check(32'h3F80_0000, 32'h4000_0000, 32'h4000_0000);   // 1*2
    check(32'h3FC0_0000, 32'hC020_0000, 32'hC070_0000);   // 1.5*-2.5 = -3.75
    check(32'h0000_0000, 32'h4000_0000, 32'h0000_0000);   // 0*2
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);   // underflow
    for (int i = 0; i < 20000; i++) begin
      ra = rand_float(-20, 20);
      rb = rand_float(-20, 20);
      check(ra, rb, r2f(f2r(ra) * f2r(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
