// tb_ready_unit: drives random buffer and engine states and checks the two
// ready flags (same cycle), their rising-edge pulses (one cycle later) and
// the interrupt line against a cycle model.
module tb_ready_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_empty = 1'b0, nn_busy = 1'b0, out_full = 1'b0, irq_en_rtr = 1'b0, irq_en_rts = 1'b0;
  logic ready_to_receive, ready_to_send, rise_rtr, rise_rts, irq;
  logic m_rtr, m_rts, m_rise_rtr, m_rise_rts;
  int checks = 0, failures = 0;

  ready_unit dut (.*);

  task automatic expect_eq(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b want %0b", what, got, want);
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
    m_rtr = 0; m_rts = 0; m_rise_rtr = 0; m_rise_rts = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_empty   = 1'($urandom);
      nn_busy    = 1'($urandom);
      out_full   = 1'($urandom);
      irq_en_rtr = 1'($urandom);
      irq_en_rts = 1'($urandom);
      #1;
      expect_eq("ready_to_receive", ready_to_receive, in_empty && !nn_busy);
      expect_eq("ready_to_send", ready_to_send, out_full);
      expect_eq("irq", irq, (irq_en_rtr && in_empty && !nn_busy) || (irq_en_rts && out_full));
      @(posedge clk);
      m_rise_rtr = (in_empty && !nn_busy) && !m_rtr;
      m_rise_rts = out_full && !m_rts;
      m_rtr      = in_empty && !nn_busy;
      m_rts      = out_full;
      #1;
      expect_eq("rise_rtr", rise_rtr, m_rise_rtr);
      expect_eq("rise_rts", rise_rts, m_rise_rts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
