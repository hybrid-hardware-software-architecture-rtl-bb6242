// tb_pso_balance: training and testing phase on the default 4-10-3 network
// with the balance-scale problem. The data set is generated: every
// combination of left weight, left distance, right weight and right distance
// in 1..5 (625 samples); the class is "left" if LW*LD > RW*RD, "right" if
// smaller, "balanced" if equal. Inputs are the attributes divided by 5;
// targets are one-hot over the three outputs. TRAIN samples are drawn at random for
// training and TEST others for testing.
// The testbench plays the processor and runs particle swarm optimisation with
// velocity control (extra term c3*r/v^2) with w = 0.92, c1 = c2 = 0.3,
// c3 = 0.00001, P particles and ITER iterations, evaluating every particle
// through the accelerator; fitness is the mean squared error over samples and
// outputs. Velocities are clamped to [-VMAX, VMAX] (a testbench choice).
// The sizes are TRAIN = 245, TEST = 100, P = 60 as in the balance-scale
// experiment, with ITER = 15 instead of 100 to keep the run short.
// Checks: outputs against the single-precision reference (every 8th network
// run, to save simulation time), the global best never rises and ends below
// its start. Reported: best error and the recognition rate on the test set.
module tb_pso_balance;
  import nn_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned NI = NI_DEF, NH = NH_DEF, NO = NO_DEF;
  localparam int unsigned D = calc_d(NI, NH, NO);
  localparam int unsigned IN_AW = $clog2(D + NI);
  localparam int unsigned ADDR_W = IN_AW + 2;
  localparam int unsigned P = 60, ITER = 15, T = 245, TEST = 100;
  localparam real W = 0.92, C1 = 0.3, C2 = 0.3, C3 = 0.00001, VMAX = 0.5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] avs_address = '0;
  logic              avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]       avs_writedata = '0, avs_readdata;
  logic              avs_readdatavalid, avs_waitrequest;
  logic              ready_to_receive, ready_to_send, rtr_pulse, rts_pulse, irq;

  nn_fpga_top dut (.*);

  logic [31:0] feat [625][4];
  int          cls [625];
  int          perm [625];

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
    if (evals % 8 == 0) begin
      nn_ref(NI, NH, NO, words, expv);
      for (int o = 0; o < int'(NO); o++) begin
        checks++;
        if (yout[o] !== expv[o]) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d = %h, expected %h", o, yout[o], expv[o]);
        end
      end
    end
    evals++;
  endtask

  function automatic real target(int t, int o);
    return (cls[perm[t]] == o) ? 1.0 : 0.0;
  endfunction

  function automatic logic [31:0] pattern_in(int t, int i);
    return feat[perm[t]][i];
  endfunction

  function automatic int argmax(logic [31:0] y []);
    int m = 0;
    for (int o = 1; o < int'(NO); o++) if (f2r(y[o]) > f2r(y[m])) m = o;
    return m;
  endfunction

  // fitness: mean squared error over patterns and outputs
  task automatic fitness(real pos [], int first, int count, output real f, output int correct);
    logic [31:0] wv [];
    logic [31:0] xin [];
    logic [31:0] y [];
    real e;
    wv  = new[D];
    xin = new[NI];
    for (int i = 0; i < int'(D); i++) wv[i] = r2f(pos[i]);
    e = 0.0;
    correct = 0;
    for (int t = first; t < first + count; t++) begin
      for (int i = 0; i < int'(NI); i++) xin[i] = pattern_in(t, i);
      nn_eval(wv, xin, y);
      for (int o = 0; o < int'(NO); o++) e += (target(t, o) - f2r(y[o])) ** 2;
      if (argmax(y) == cls[perm[t]]) correct++;
    end
    f = e / real'(count * int'(NO));
  endtask

  function automatic real urand01();
    return real'($urandom) / 4294967296.0;
  endfunction

  initial begin
    repeat (200_000_000) @(posedge clk);
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
    // balance-scale data set and a random split
    for (int n = 0; n < 625; n++) begin
      int lw, ld, rw, rd;
      lw = n / 125 + 1; ld = (n / 25) % 5 + 1; rw = (n / 5) % 5 + 1; rd = n % 5 + 1;
      feat[n][0] = r2f(real'(lw) / 5.0);
      feat[n][1] = r2f(real'(ld) / 5.0);
      feat[n][2] = r2f(real'(rw) / 5.0);
      feat[n][3] = r2f(real'(rd) / 5.0);
      cls[n] = (lw * ld > rw * rd) ? 0 : (lw * ld == rw * rd) ? 1 : 2;
      perm[n] = n;
    end
    perm.shuffle();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    gbest = 1.0e30;
    for (int p = 0; p < int'(P); p++) begin
      for (int d = 0; d < int'(D); d++) begin
        x[p][d] = 2.0 * urand01() - 1.0;
        v[p][d] = 0.2 * (2.0 * urand01() - 1.0);
        pb[p][d] = x[p][d];
        pos[d] = x[p][d];
      end
      fitness(pos, 0, T, f, correct);
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
          vn = W * v[p][d] + C1 * (pb[p][d] - x[p][d]) + C2 * (gb[d] - x[p][d]);
          if (v[p][d] != 0.0) vn += C3 * urand01() / (v[p][d] * v[p][d]);
          else vn += VMAX;
          if (vn > VMAX) vn = VMAX;
          if (vn < -VMAX) vn = -VMAX;
          v[p][d] = vn;
          x[p][d] = x[p][d] + vn;
          pos[d] = x[p][d];
        end
        fitness(pos, 0, T, f, correct);
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
    for (int d = 0; d < int'(D); d++) pos[d] = gb[d];
    fitness(pos, T, TEST, f, correct);
    $display("PSO: P=%0d I=%0d evaluations=%0d Gbest %f -> %f, training recognition %0d of %0d, testing recognition %0d of %0d",
             P, ITER, evals, gbest0, gbest, best_correct, T, correct, TEST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
