// tb_pso_xor: training phase on the 2-6-4 network (XOR problem). The
// testbench plays the processor: it runs particle swarm optimisation three
// times, once with each velocity update (standard PSO with random factors on
// the c1 and c2 terms; velocity control with an extra c3*r/exp(v^2) term;
// velocity control with an extra c3*r/v^2 term), and uses the accelerator to
// evaluate every particle on every training pattern.
// Settings: P = 70 particles, I = 60 iterations, w = 0.92, c1 = c2 = 0.3,
// c3 = 0.00001. Fitness is the mean squared error over the four XOR patterns
// and the four outputs. Targets: output 0 is 1 for XOR = 0, output 1 is 1 for
// XOR = 1, outputs 2 and 3 are 0 (a testbench choice). Positions start in
// [-1, 1]; velocities are clamped to [-VMAX, VMAX] (a testbench choice that
// keeps the 1/v^2 jump finite).
// Checks: every output read from the accelerator equals the single-precision
// reference; in each run the global best never increases and ends below
// its start.
// Reported: initial and final best error and the recognition on the four
// patterns with the best weights.
module tb_pso_xor;
  import nn_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned NI = 2, NH = 6, NO = 4;
  localparam int unsigned D = calc_d(NI, NH, NO);
  localparam int unsigned IN_AW = $clog2(D + NI);
  localparam int unsigned ADDR_W = IN_AW + 2;
  localparam int unsigned P = 70, ITER = 60, T = 4;
  localparam real W = 0.92, C1 = 0.3, C2 = 0.3, C3 = 0.00001, VMAX = 0.5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] avs_address = '0;
  logic              avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]       avs_writedata = '0, avs_readdata;
  logic              avs_readdatavalid, avs_waitrequest;
  logic              ready_to_receive, ready_to_send, rtr_pulse, rts_pulse, irq;

  nn_fpga_top #(.NI(NI), .NH(NH), .NO(NO)) dut (.*);

  int checks = 0, failures = 0, evals = 0;

  function automatic logic [ADDR_W-1:0] addr(region_e r, int off);
    return {r, IN_AW'(off)};
  endfunction

  task automatic bus_write(logic [ADDR_W-1:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_write = 1'b1; avs_writedata = d;
    do @(posedge clk); while (avs_waitrequest);
    #1 avs_write = 1'b0;
  endtask

  task automatic bus_read(logic [ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(posedge clk); #1;
    avs_read = 1'b0;
    d = avs_readdata;
  endtask

  // evaluate one weight vector on one pattern in hardware
  task automatic nn_eval(logic [31:0] wv [], logic [31:0] xin [], ref logic [31:0] yout []);
    logic [31:0] words [];
    logic [31:0] expv [];
    logic [31:0] d;
    words = new[D + NI];
    for (int i = 0; i < int'(D); i++) words[i] = wv[i];
    for (int i = 0; i < int'(NI); i++) words[D + i] = xin[i];
    while (!ready_to_receive) @(posedge clk);
    for (int i = 0; i < int'(D + NI); i++) bus_write(addr(REG_BUF_IN, i), words[i]);
    while (!ready_to_send) @(posedge clk);
    yout = new[NO];
    for (int o = 0; o < int'(NO); o++) begin
      bus_read(addr(REG_BUF_OUT, o), d);
      yout[o] = d;
    end
    nn_ref(NI, NH, NO, words, expv);
    for (int o = 0; o < int'(NO); o++) begin
      checks++;
      if (yout[o] !== expv[o]) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d = %h, expected %h", o, yout[o], expv[o]);
      end
    end
    evals++;
  endtask

  function automatic real target(int t, int o);
    int x;
    x = (t & 1) ^ (t >> 1);
    if (o == 0) return (x == 0) ? 1.0 : 0.0;
    if (o == 1) return (x == 1) ? 1.0 : 0.0;
    return 0.0;
  endfunction

  function automatic logic [31:0] pattern_in(int t, int i);
    return ((t >> i) & 1) ? 32'h3F80_0000 : 32'h0000_0000;
  endfunction

  // fitness: mean squared error over patterns and outputs
  task automatic fitness(real pos [], output real f, output int correct);
    logic [31:0] wv [];
    logic [31:0] xin [];
    logic [31:0] y [];
    real e;
    wv  = new[D];
    xin = new[NI];
    for (int i = 0; i < int'(D); i++) wv[i] = r2f(pos[i]);
    e = 0.0;
    correct = 0;
    for (int t = 0; t < int'(T); t++) begin
      for (int i = 0; i < int'(NI); i++) xin[i] = pattern_in(t, i);
      nn_eval(wv, xin, y);
      for (int o = 0; o < int'(NO); o++) e += (target(t, o) - f2r(y[o])) ** 2;
      if ((f2r(y[1]) > f2r(y[0])) == (((t & 1) ^ (t >> 1)) == 1)) correct++;
    end
    f = e / real'(T * NO);
  endtask

  function automatic real urand01();
    return real'($urandom) / 4294967296.0;
  endfunction

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x [P][D], v [P][D], pb [P][D], gb [D];
    real pbest [P], gbest, gbest0, f, vn;
    real pos [];
    int  correct, best_correct;
    pos = new[D];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int algo = 0; algo < 3; algo++) begin
    gbest = 1.0e30;
    for (int p = 0; p < int'(P); p++) begin
      for (int d = 0; d < int'(D); d++) begin
        x[p][d] = 2.0 * urand01() - 1.0;
        v[p][d] = 0.2 * (2.0 * urand01() - 1.0);
        pb[p][d] = x[p][d];
        pos[d] = x[p][d];
      end
      fitness(pos, f, correct);
      pbest[p] = f;
      if (f < gbest) begin
        gbest = f;
        best_correct = correct;
        for (int d = 0; d < int'(D); d++) gb[d] = x[p][d];
      end
    end
    gbest0 = gbest;
    for (int it = 0; it < int'(ITER); it++) begin
      real gprev;
      gprev = gbest;
      for (int p = 0; p < int'(P); p++) begin
        for (int d = 0; d < int'(D); d++) begin
          if (algo == 0) begin
            // standard PSO
            vn = W * v[p][d] + C1 * urand01() * (pb[p][d] - x[p][d])
               + C2 * urand01() * (gb[d] - x[p][d]);
          end else begin
            vn = W * v[p][d] + C1 * (pb[p][d] - x[p][d]) + C2 * (gb[d] - x[p][d]);
            if (algo == 1) vn += C3 * urand01() / $exp(v[p][d] * v[p][d]);
            else if (v[p][d] != 0.0) vn += C3 * urand01() / (v[p][d] * v[p][d]);
            else vn += VMAX;
          end
          if (vn > VMAX) vn = VMAX;
          if (vn < -VMAX) vn = -VMAX;
          v[p][d] = vn;
          x[p][d] = x[p][d] + vn;
          pos[d] = x[p][d];
        end
        fitness(pos, f, correct);
        if (f < pbest[p]) begin
          pbest[p] = f;
          for (int d = 0; d < int'(D); d++) pb[p][d] = x[p][d];
        end
        if (f < gbest) begin
          gbest = f;
          best_correct = correct;
          for (int d = 0; d < int'(D); d++) gb[d] = x[p][d];
        end
      end
      checks++;
      if (gbest > gprev) begin
        failures++;
        $display("FAIL global best rose in iteration %0d", it);
      end
    end
    checks++;
    if (!(gbest < gbest0)) begin
      failures++;
      $display("FAIL global best did not improve: %f", gbest);
    end
    $display("%s: P=%0d I=%0d Gbest %f -> %f, XOR patterns correct with best weights: %0d of 4",
             (algo == 0) ? "SPSO   " : (algo == 1) ? "PSOe_CV" : "PSOd_CV",
             P, ITER, gbest0, gbest, best_correct);
    end
    $display("network runs in hardware: %0d", evals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
