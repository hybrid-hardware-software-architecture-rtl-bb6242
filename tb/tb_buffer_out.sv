// tb_buffer_out: writes the NO outputs in random order, checks the flags and
// count, reads them back combinationally, and checks release.
module tb_buffer_out;
  localparam int unsigned DEPTH = 3;
  localparam int unsigned AW    = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, release_buf = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [31:0]   wr_data = '0, rd_data;
  logic          empty, full;
  logic [AW:0]   count;
  logic [31:0]   model [DEPTH];
  int checks = 0, failures = 0;

  buffer_out #(.DEPTH(DEPTH)) dut (.*);

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [DEPTH];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      @(negedge clk);
      expect_eq("empty", empty, 1);
      expect_eq("not full", full, 0);
      for (int i = 0; i < int'(DEPTH); i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < int'(DEPTH); i++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = AW'(order[i]); wr_data = $urandom;
        model[order[i]] = wr_data;
        @(posedge clk); #1;
        wr_en = 1'b0;
        expect_eq("count", count, i + 1);
        expect_eq("full", full, (i + 1 == int'(DEPTH)) ? 1 : 0);
      end
      for (int i = 0; i < int'(DEPTH); i++) begin
        rd_addr = AW'(i);
        #1;
        expect_eq("read", rd_data, model[i]);
      end
      rd_addr = 2'd3;
      #1;
      expect_eq("read out of range", rd_data, 0);
      @(negedge clk);
      release_buf = 1'b1;
      @(posedge clk); #1;
      release_buf = 1'b0;
      expect_eq("empty after release", empty, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
