// tb_nn_engine: runs the network engine (4-10-3 by default) on random weight
// sets and inputs held in a behavioural copy of the input buffer, and checks
//  - every output bit for bit against the single-precision reference,
//  - the length of a run, 2*NI + 2*D + 2*NH + NO + 1 busy cycles,
//  - that a run does not start while the output buffer is still full.
module tb_nn_engine;
  import nn_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned NI = 4, NH = 10, NO = 3;
  localparam int unsigned D = calc_d(NI, NH, NO);
  localparam int unsigned IN_AW = $clog2(D + NI);
  localparam int unsigned OUT_AW = $clog2(NO);
  localparam int unsigned RUNS = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_full = 1'b0, out_empty = 1'b1;
  logic [IN_AW-1:0]  in_rd_addr;
  logic [31:0]       in_rd_data;
  logic              out_wr_en;
  logic [OUT_AW-1:0] out_wr_addr;
  logic [31:0]       out_wr_data;
  logic              busy, done;

  logic [31:0] mem [D + NI];
  logic [31:0] got [NO];
  int          n_written;
  int checks = 0, failures = 0;

  nn_engine #(.NI(NI), .NH(NH), .NO(NO)) dut (.*);

  always_ff @(posedge clk) in_rd_data <= mem[in_rd_addr];
  always_ff @(posedge clk) if (out_wr_en) begin
    got[out_wr_addr] <= out_wr_data;
    n_written <= n_written + 1;
  end

  initial begin
    repeat (RUNS * 1000 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] words [];
    logic [31:0] exp_out [];
    int cycles;
    words = new[D + NI];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < int'(RUNS); r++) begin
      for (int i = 0; i < int'(D); i++) words[i] = rand_float(-3, 1);
      for (int i = 0; i < int'(NI); i++) words[D + i] = {1'b0, rand_float(-3, -1)} ;
      for (int i = 0; i < int'(D + NI); i++) mem[i] = words[i];
      nn_ref(NI, NH, NO, words, exp_out);
      n_written = 0;
      @(negedge clk);
      // every fourth run: output buffer still holds the previous results
      if (r % 4 == 1) begin
        out_empty = 1'b0;
        in_full   = 1'b1;
        repeat (10) begin
          @(negedge clk);
          checks++;
          if (busy) begin
            failures++;
            $display("FAIL engine started with output buffer full");
          end
        end
        out_empty = 1'b1;
      end
      in_full = 1'b1;
      @(posedge clk); #1;
      cycles = 0;
      while (!done) begin
        @(posedge clk); #1;
        cycles++;
        if (cycles > 5000) break;
      end
      // done is high now; the buffer would clear at this edge
      @(negedge clk);
      in_full = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (cycles + 1 != int'(2 * NI + 2 * D + 2 * NH + NO + 1)) begin
        failures++;
        $display("FAIL run took %0d busy cycles, expected %0d", cycles + 1, 2 * NI + 2 * D + 2 * NH + NO + 1);
      end
      checks++;
      if (n_written != int'(NO)) begin
        failures++;
        $display("FAIL %0d outputs written", n_written);
      end
      for (int o = 0; o < int'(NO); o++) begin
        checks++;
        if (got[o] !== exp_out[o]) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d output %0d = %h (%f), expected %h (%f)",
                                      r, o, got[o], f2r(got[o]), exp_out[o], f2r(exp_out[o]));
        end
      end
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL engine not idle after done");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
