// tb_fp_sigmoid: checks the PLAN activation bit for bit against a reference
// that rounds at the same points, and checks that it stays within 0.02 of
// the true logistic function, over all four segments and both signs.
module tb_fp_sigmoid;
  import tb_fp_ref_pkg::*;

  logic [31:0] x, y;
  int checks = 0, failures = 0;
  int seg_hits [4];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp_sigmoid dut (.x(x), .y(y));

  task automatic check(logic [31:0] tx);
    real ax;
    x = tx;
    #1;
    ax = f2r({1'b0, tx[30:0]});
    if (ax >= 5.0) seg_hits[3]++;
    else if (ax >= 2.375) seg_hits[2]++;
    else if (ax >= 1.0) seg_hits[1]++;
    else seg_hits[0]++;
    checks++;
    if (y !== plan_ref(tx)) begin
      failures++;
      if (failures < 10) $display("FAIL sigmoid(%h) = %h, expected %h", tx, y, plan_ref(tx));
    end
    checks++;
    if ((f2r(y) - sigmoid_true(f2r(tx)) > 0.02) || (sigmoid_true(f2r(tx)) - f2r(y) > 0.02)) begin
      failures++;
      if (failures < 10) $display("FAIL sigmoid(%f) = %f, far from %f", f2r(tx), f2r(y), sigmoid_true(f2r(tx)));
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
    check(32'h0000_0000);                  // 0 -> 0.5
    checks++; if (y !== 32'h3F00_0000) failures++;
    check(32'h40A0_0000);                  // 5 -> 1
    checks++; if (y !== 32'h3F80_0000) failures++;
    check(32'hC0A0_0000);                  // -5 -> 0
    checks++; if (y !== 32'h0000_0000) failures++;
    check(32'h3F80_0000);                  // 1 -> 0.75
    checks++; if (y !== 32'h3F40_0000) failures++;
    check(32'h4018_0000);                  // 2.375
    check(32'h2000_0000);                  // tiny
    for (int i = 0; i < 20000; i++) begin
      check(rand_float(-6, 3));
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin
        failures++;
        $display("FAIL segment %0d never exercised", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
