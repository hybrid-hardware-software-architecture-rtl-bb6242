// nn_fpga_top: the FPGA-side component of a hybrid system in which a soft
// processor trains a neural network by particle swarm optimisation and the
// network itself is evaluated in hardware.
//
// The processor writes one set of D weights and biases plus NI inputs into
// buffer_in over the Avalon-MM slave. When buffer_in is full, the network
// engine evaluates the NI-NH-NH-NO perceptron with the floating-point
// calculation unit and writes the NO outputs into buffer_out; on completion it
// empties buffer_in. The ready unit raises ready_to_receive while buffer_in is
// empty and the engine idle, and ready_to_send while buffer_out is full; the
// processor then reads the outputs, and reading the last one empties
// buffer_out. The flags are also readable in a status word, can raise irq,
// and pulse rtr_pulse / rts_pulse for one cycle when they rise.
// One evaluation costs D + NI bus writes, the engine's run (see nn_engine) and
// NO + 1 bus reads. Defaults are the 4-10-3 network (D = 193, buffer_in of 197
// words). The partitioning follows the original system; the register map,
// handshake details and activation are this design's choices.
module nn_fpga_top
  import nn_pkg::*;
#(
  parameter int unsigned NI     = NI_DEF,
  parameter int unsigned NH     = NH_DEF,
  parameter int unsigned NO     = NO_DEF,
  parameter int unsigned D      = calc_d(NI, NH, NO),
  parameter int unsigned IN_AW  = $clog2(D + NI),
  parameter int unsigned OUT_AW = (NO > 1) ? $clog2(NO) : 1,
  parameter int unsigned ADDR_W = IN_AW + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  output logic              avs_readdatavalid,
  output logic              avs_waitrequest,
  output logic              ready_to_receive,
  output logic              ready_to_send,
  output logic              rtr_pulse,     // one-cycle pulse when ready_to_receive rises
  output logic              rts_pulse,     // one-cycle pulse when ready_to_send rises
  output logic              irq
);

  logic             in_wr_en, in_empty, in_full, in_clear;
  logic [IN_AW-1:0] in_wr_addr, in_rd_addr;
  float32_t         in_wr_data, in_rd_data;
  logic [IN_AW:0]   in_count;

  logic              out_wr_en, out_empty, out_full, out_release;
  logic [OUT_AW-1:0] out_wr_addr, out_rd_addr;
  float32_t          out_wr_data, out_rd_data;
  logic [OUT_AW:0]   out_count;

  logic nn_busy, irq_en_rtr, irq_en_rts;

  avalon_slave #(.IN_AW(IN_AW), .OUT_AW(OUT_AW), .NO(NO), .ADDR_W(ADDR_W)) u_slave (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_readdatavalid, .avs_waitrequest,
    .in_wr_en, .in_wr_addr, .in_wr_data, .in_full,
    .out_rd_addr, .out_rd_data, .out_release, .out_full, .out_count, .in_count,
    .ready_to_receive, .ready_to_send, .nn_busy,
    .irq_en_rtr, .irq_en_rts
  );

  buffer_in #(.DEPTH(D + NI), .AW(IN_AW)) u_buf_in (
    .clk, .rst_n,
    .wr_en(in_wr_en), .wr_addr(in_wr_addr), .wr_data(in_wr_data),
    .rd_addr(in_rd_addr), .rd_data(in_rd_data), .clear(in_clear),
    .empty(in_empty), .full(in_full), .count(in_count)
  );

  nn_engine #(.NI(NI), .NH(NH), .NO(NO), .D(D), .IN_AW(IN_AW), .OUT_AW(OUT_AW)) u_nn (
    .clk, .rst_n,
    .in_full, .out_empty,
    .in_rd_addr, .in_rd_data,
    .out_wr_en, .out_wr_addr, .out_wr_data,
    .busy(nn_busy), .done(in_clear)
  );

  buffer_out #(.DEPTH(NO), .AW(OUT_AW)) u_buf_out (
    .clk, .rst_n,
    .wr_en(out_wr_en), .wr_addr(out_wr_addr), .wr_data(out_wr_data),
    .rd_addr(out_rd_addr), .rd_data(out_rd_data), .release_buf(out_release),
    .empty(out_empty), .full(out_full), .count(out_count)
  );

  ready_unit u_ready (
    .clk, .rst_n,
    .in_empty, .nn_busy, .out_full,
    .irq_en_rtr, .irq_en_rts,
    .ready_to_receive, .ready_to_send,
    .rise_rtr(rtr_pulse), .rise_rts(rts_pulse), .irq
  );

endmodule
