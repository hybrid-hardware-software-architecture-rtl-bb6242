// tb_nn_fpga_top: end-to-end test of the accelerator at its default size, the
// 4-10-3 network, acting as the processor in the testing phase. One random
// weight set is evaluated on SAMPLES = 45 random input samples (the size of
// the iris test split). For every sample the host waits for ready_to_receive,
// writes the D weights and NI inputs over the bus, waits for ready_to_send
// (by polling the status word or by the interrupt) and reads the NO outputs,
// which are checked bit for bit against the single-precision reference. On
// every second sample the host writes the next sample before collecting the
// results, which makes the bus stall (waitrequest) while the network runs and
// holds the next run back until the outputs are read. The test counts each of
// these mechanisms and fails if one never happens; it also checks that
// ready_to_send rises a fixed 2*NI + 2*D + 2*NH + NO + 1 cycles (418) after
// the write that fills the input buffer, or after the read that releases the
// output buffer when that comes later.
module tb_nn_fpga_top;
  import nn_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned NI = NI_DEF, NH = NH_DEF, NO = NO_DEF;
  localparam int unsigned D = calc_d(NI, NH, NO);
  localparam int unsigned IN_AW = $clog2(D + NI);
  localparam int unsigned ADDR_W = IN_AW + 2;
  localparam int unsigned SAMPLES = 45;
  localparam int unsigned LATENCY = 2 * NI + 2 * D + 2 * NH + NO + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] avs_address = '0;
  logic              avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]       avs_writedata = '0, avs_readdata;
  logic              avs_readdatavalid, avs_waitrequest;
  logic              ready_to_receive, ready_to_send, rtr_pulse, rts_pulse, irq;

  nn_fpga_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall_cycles = 0, n_held_starts = 0, n_irq_waits = 0, n_poll_waits = 0;
  int n_runs = 0, n_releases = 0, n_rts_pulses = 0;
  longint cyc = 0;
  longint fill_cycle = -1;
  logic rts_q = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  // observe the design from outside: runs started, starts held back by an
  // unread output buffer, ready_to_send latency after the filling write
  logic busy_q = 1'b0, held_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    busy_q <= dut.u_nn.busy;
    if (dut.u_nn.busy && !busy_q) n_runs++;
    if (rts_pulse) n_rts_pulses++;
    held_q <= dut.in_full && !dut.out_empty && !dut.u_nn.busy;
    if (dut.in_full && !dut.out_empty && !dut.u_nn.busy && !held_q) n_held_starts++;
    if (dut.out_release) begin
      n_releases++;
      if (fill_cycle >= 0) fill_cycle = cyc + 1;
    end
    rts_q <= ready_to_send;
    if (ready_to_send && !rts_q && fill_cycle >= 0) begin
      checks++;
      if (cyc - fill_cycle != longint'(LATENCY)) begin
        failures++;
        $display("FAIL ready_to_send after %0d cycles, expected %0d", cyc - fill_cycle, LATENCY);
      end
      fill_cycle = -1;
    end
  end

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  function automatic logic [ADDR_W-1:0] addr(region_e r, int off);
    return {r, IN_AW'(off)};
  endfunction

  task automatic bus_write(logic [ADDR_W-1:0] a, logic [31:0] d, output bit stalled);
    stalled = 0;
    @(negedge clk);
    avs_address = a; avs_write = 1'b1; avs_writedata = d;
    forever begin
      @(posedge clk);
      if (!avs_waitrequest) break;
      stalled = 1;
      n_stall_cycles++;
    end
    #1 avs_write = 1'b0;
  endtask

  task automatic bus_read(logic [ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(posedge clk); #1;
    avs_read = 1'b0;
    checks++;
    if (!avs_readdatavalid) begin
      failures++;
      $display("FAIL readdatavalid missing");
    end
    d = avs_readdata;
  endtask

  task automatic send_sample(logic [31:0] words [], output bit any_stall);
    bit st;
    any_stall = 0;
    for (int i = 0; i < int'(D + NI); i++) begin
      bus_write(addr(REG_BUF_IN, i), words[i], st);
      any_stall |= st;
    end
    fill_cycle = cyc;
  endtask

  task automatic wait_ready_to_receive();
    logic [31:0] d;
    status_t st;
    int n = 0;
    do begin
      bus_read(addr(REG_STATUS, 0), d);
      st = status_t'(d);
      n++;
    end while (!st.ready_to_receive && n < 10000);
    expect_eq("ready_to_receive port agrees", ready_to_receive, 1);
  endtask

  task automatic collect(int s, logic [31:0] exp_out [], bit use_irq);
    logic [31:0] d;
    status_t st;
    int n = 0;
    if (use_irq) begin
      while (!irq && n < 10000) begin
        @(posedge clk);
        n++;
      end
      n_irq_waits++;
    end else begin
      do begin
        bus_read(addr(REG_STATUS, 0), d);
        st = status_t'(d);
        n++;
      end while (!st.ready_to_send && n < 10000);
      n_poll_waits++;
      expect_eq("out_count in status", st.out_count, NO);
    end
    expect_eq("ready_to_send port", ready_to_send, 1);
    for (int o = 0; o < int'(NO); o++) begin
      bus_read(addr(REG_BUF_OUT, o), d);
      checks++;
      if (d !== exp_out[o]) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d output %0d = %h (%f), expected %h (%f)",
                                    s, o, d, f2r(d), exp_out[o], f2r(exp_out[o]));
      end
    end
  endtask

  initial begin
    repeat (SAMPLES * 3000 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] weights [];
    logic [31:0] words [][];
    logic [31:0] exp_out [][];
    logic [31:0] d;
    bit st, stalled_once;
    weights = new[D];
    words   = new[SAMPLES];
    exp_out = new[SAMPLES];
    for (int i = 0; i < int'(D); i++) weights[i] = rand_float(-3, 1);
    for (int s = 0; s < int'(SAMPLES); s++) begin
      words[s] = new[D + NI];
      for (int i = 0; i < int'(D); i++) words[s][i] = weights[i];
      for (int i = 0; i < int'(NI); i++) words[s][D + i] = {1'b0, rand_float(-3, 2)};
      nn_ref(NI, NH, NO, words[s], exp_out[s]);
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // interrupt on ready_to_send
    bus_write(addr(REG_CONTROL, 0), 32'h2, st);
    bus_read(addr(REG_CONTROL, 0), d);
    expect_eq("control readback", d, 2);

    stalled_once = 0;
    for (int s = 0; s < int'(SAMPLES); s++) begin
      if (s % 2 == 0) begin
        wait_ready_to_receive();
        send_sample(words[s], st);
        if (s + 1 < int'(SAMPLES)) begin
          // overlap: push the next sample while this one runs
          send_sample(words[s + 1], st);
          stalled_once |= st;
          collect(s, exp_out[s], 1'b1);
          collect(s + 1, exp_out[s + 1], 1'b0);
          s++;
        end else begin
          collect(s, exp_out[s], 1'b0);
        end
      end
    end
    expect_eq("runs", n_runs, SAMPLES);
    expect_eq("releases", n_releases, SAMPLES);
    expect_eq("ready_to_send pulses", n_rts_pulses, SAMPLES);
    checks++; if (n_stall_cycles == 0) begin failures++; $display("FAIL no bus stall seen"); end
    checks++; if (n_held_starts == 0) begin failures++; $display("FAIL no held start seen"); end
    checks++; if (n_irq_waits == 0)   begin failures++; $display("FAIL interrupt never used"); end
    checks++; if (n_poll_waits == 0)  begin failures++; $display("FAIL polling never used"); end
    $display("samples=%0d runs=%0d stall_cycles=%0d held_starts=%0d irq_waits=%0d polls=%0d cycles=%0d",
             SAMPLES, n_runs, n_stall_cycles, n_held_starts, n_irq_waits, n_poll_waits, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
