// tb_buffer_in: fills the input buffer in random order (with repeated
// addresses), checks the empty/full flags and the count, reads every word
// back through the synchronous port one cycle after its address, and checks
// that clear empties the buffer. Default depth, 197 words.
module tb_buffer_in;
  localparam int unsigned DEPTH = 197;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, clear = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [31:0]   wr_data = '0, rd_data;
  logic          empty, full;
  logic [AW:0]   count;
  logic [31:0]   model [DEPTH];
  int checks = 0, failures = 0;

  buffer_in #(.DEPTH(DEPTH)) dut (.*);

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
    @(posedge clk);
    for (int round = 0; round < 2; round++) begin
      expect_eq("empty after reset/clear", empty, 1);
      expect_eq("count zero", count, 0);
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
        expect_eq("empty", empty, 0);
        // a repeated write to an earlier address must not count twice
        if (i > 0 && i % 17 == 0 && i + 1 < int'(DEPTH)) begin
          @(negedge clk);
          wr_en = 1'b1; wr_addr = AW'(order[i - 1]); wr_data = $urandom;
          model[order[i - 1]] = wr_data;
          @(posedge clk); #1;
          wr_en = 1'b0;
          expect_eq("count after rewrite", count, i + 1);
        end
      end
      for (int i = 0; i < int'(DEPTH); i++) begin
        @(negedge clk);
        rd_addr = AW'(i);
        @(posedge clk); #1;
        expect_eq("read data", rd_data, model[i]);
      end
      @(negedge clk);
      clear = 1'b1;
      @(posedge clk); #1;
      clear = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
