// tb_fp_calc: checks the calculation unit's multiply-add (product rounded,
// then sum rounded) and its activation output against the reference.
module tb_fp_calc;
  import tb_fp_ref_pkg::*;

  logic [31:0] acc, w, x, mac, z, act;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp_calc dut (.acc(acc), .w(w), .x(x), .mac(mac), .z(z), .act(act));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p, e_mac;
    for (int i = 0; i < 10000; i++) begin
      acc = rand_float(-4, 4);
      w   = rand_float(-4, 2);
      x   = rand_float(-4, 2);
      z   = rand_float(-5, 3);
      #1;
      p     = r2f(f2r(w) * f2r(x));
      e_mac = r2f(f2r(acc) + f2r(p));
      checks++;
      if (mac !== e_mac) begin
        failures++;
        if (failures < 10) $display("FAIL mac %h+%h*%h = %h expected %h", acc, w, x, mac, e_mac);
      end
      checks++;
      if (act !== plan_ref(z)) begin
        failures++;
        if (failures < 10) $display("FAIL act %h = %h expected %h", z, act, plan_ref(z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
