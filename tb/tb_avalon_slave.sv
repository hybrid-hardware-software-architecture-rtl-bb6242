// tb_avalon_slave: checks the slave's address decoding, the one-cycle read
// latency, waitrequest on writes to a full input buffer, the release pulse on
// reading the last output, the status word and the interrupt-enable register.
module tb_avalon_slave;
  import nn_pkg::*;

  localparam int unsigned IN_AW = 8, OUT_AW = 2, NO = 3, ADDR_W = IN_AW + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] avs_address = '0;
  logic              avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]       avs_writedata = '0, avs_readdata;
  logic              avs_readdatavalid, avs_waitrequest;
  logic              in_wr_en;
  logic [IN_AW-1:0]  in_wr_addr;
  float32_t          in_wr_data;
  logic              in_full = 1'b0;
  logic [OUT_AW-1:0] out_rd_addr;
  float32_t          out_rd_data;
  logic              out_release;
  logic              out_full = 1'b0;
  logic [OUT_AW:0]   out_count = '0;
  logic [IN_AW:0]    in_count = '0;
  logic              ready_to_receive = 1'b0, ready_to_send = 1'b0, nn_busy = 1'b0;
  logic              irq_en_rtr, irq_en_rts;
  int checks = 0, failures = 0;

  avalon_slave #(.IN_AW(IN_AW), .OUT_AW(OUT_AW), .NO(NO)) dut (.*);

  // output buffer contents seen by the slave: a known function of the index
  assign out_rd_data = 32'hA500_0000 | 32'(out_rd_addr);

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

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    status_t st;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // writes into buffer_in pass straight through
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      avs_address = addr(REG_BUF_IN, i * 3); avs_write = 1'b1; avs_writedata = 32'h1000 + 32'(i);
      #1;
      expect_eq("in_wr_en", in_wr_en, 1);
      expect_eq("in_wr_addr", in_wr_addr, i * 3);
      expect_eq("in_wr_data", in_wr_data, 32'h1000 + i);
      expect_eq("no wait", avs_waitrequest, 0);
    end
    // full input buffer: the write waits and is not passed on
    in_full = 1'b1;
    #1;
    expect_eq("waitrequest when full", avs_waitrequest, 1);
    expect_eq("write held", in_wr_en, 0);
    @(negedge clk);
    in_full = 1'b0;
    #1;
    expect_eq("wait released", avs_waitrequest, 0);
    @(negedge clk);
    avs_write = 1'b0;
    // reads of buffer_out, one cycle latency, release on the last word
    out_full = 1'b1;
    for (int i = 0; i < int'(NO); i++) begin
      @(negedge clk);
      avs_address = addr(REG_BUF_OUT, i); avs_read = 1'b1;
      #1;
      expect_eq("release only on last", out_release, (i == int'(NO) - 1) ? 1 : 0);
      @(posedge clk); #1;
      avs_read = 1'b0;
      expect_eq("readdatavalid", avs_readdatavalid, 1);
      expect_eq("readdata", avs_readdata, 32'hA500_0000 | i);
    end
    @(posedge clk); #1;
    expect_eq("readdatavalid low", avs_readdatavalid, 0);
    // status word
    @(negedge clk);
    ready_to_receive = 1'b1; ready_to_send = 1'b0; nn_busy = 1'b1; out_count = 3'd2; in_count = 9'd197;
    avs_address = addr(REG_STATUS, 0); avs_read = 1'b1;
    @(posedge clk); #1;
    avs_read = 1'b0;
    st = status_t'(avs_readdata);
    expect_eq("status rtr", st.ready_to_receive, 1);
    expect_eq("status rts", st.ready_to_send, 0);
    expect_eq("status busy", st.busy, 1);
    expect_eq("status count", st.out_count, 2);
    expect_eq("status in count", st.in_count, 197);
    // control register
    @(negedge clk);
    avs_address = addr(REG_CONTROL, 0); avs_write = 1'b1; avs_writedata = 32'h2;
    @(posedge clk); #1;
    avs_write = 1'b0;
    expect_eq("irq_en_rtr", irq_en_rtr, 0);
    expect_eq("irq_en_rts", irq_en_rts, 1);
    @(negedge clk);
    avs_read = 1'b1;
    @(posedge clk); #1;
    avs_read = 1'b0;
    expect_eq("control readback", avs_readdata, 2);
    // a write to the output region does not reach buffer_in
    @(negedge clk);
    avs_address = addr(REG_BUF_OUT, 1); avs_write = 1'b1;
    #1;
    expect_eq("no in write from other region", in_wr_en, 0);
    @(negedge clk);
    avs_write = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
