// avalon_slave: Avalon memory-mapped slave that connects the processor to the
// accelerator's buffers.
//
// Word addresses are split by their two top bits into four regions:
//   0 buffer_in   write-only, offset = word index (D weights, then NI inputs)
//   1 buffer_out  read-only, offset = output index; reading the last output
//                 while the buffer is full releases it for the next run
//   2 status      read-only, the status_t word of nn_pkg (ready_to_receive,
//                 ready_to_send, busy, results held, input words held)
//   3 control     write: bit 0 enables the interrupt on ready_to_receive,
//                 bit 1 the interrupt on ready_to_send; read: those bits
// Reads have a fixed latency of one cycle (readdata with readdatavalid one
// cycle after read). A write into buffer_in while that buffer is full is held
// off with waitrequest until the network has consumed it; no other access
// waits. The use of Avalon-MM follows the original system; the register map,
// the read latency and the release-on-read rule are this design's choices.
module avalon_slave
  import nn_pkg::*;
#(
  parameter int unsigned IN_AW  = 8,
  parameter int unsigned OUT_AW = 2,
  parameter int unsigned NO     = NO_DEF,
  parameter int unsigned ADDR_W = IN_AW + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  output logic              avs_readdatavalid,
  output logic              avs_waitrequest,
  // buffer_in write port
  output logic              in_wr_en,
  output logic [IN_AW-1:0]  in_wr_addr,
  output float32_t          in_wr_data,
  input  logic              in_full,
  // buffer_out read port
  output logic [OUT_AW-1:0] out_rd_addr,
  input  float32_t          out_rd_data,
  output logic              out_release,
  input  logic              out_full,
  input  logic [OUT_AW:0]   out_count,
  input  logic [IN_AW:0]    in_count,
  // status and control
  input  logic              ready_to_receive,
  input  logic              ready_to_send,
  input  logic              nn_busy,
  output logic              irq_en_rtr,
  output logic              irq_en_rts
);

  region_e          region;
  logic [IN_AW-1:0] offset;
  status_t          status;

  assign region = region_e'(avs_address[ADDR_W-1 -: 2]);
  assign offset = avs_address[IN_AW-1:0];

  assign avs_waitrequest = avs_write && (region == REG_BUF_IN) && in_full;

  assign in_wr_en   = avs_write && (region == REG_BUF_IN) && !in_full;
  assign in_wr_addr = offset;
  assign in_wr_data = avs_writedata;

  assign out_rd_addr = OUT_AW'(offset);
  assign out_release = avs_read && (region == REG_BUF_OUT) && out_full &&
                       (offset == IN_AW'(NO - 1));

  always_comb begin
    status                  = '0;
    status.ready_to_receive = ready_to_receive;
    status.ready_to_send    = ready_to_send;
    status.busy             = nn_busy;
    status.out_count        = 8'(out_count);
    status.in_count         = 16'(in_count);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
      irq_en_rtr        <= 1'b0;
      irq_en_rts        <= 1'b0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        unique case (region)
          REG_BUF_OUT: avs_readdata <= out_rd_data;
          REG_STATUS:  avs_readdata <= status;
          REG_CONTROL: avs_readdata <= {30'd0, irq_en_rts, irq_en_rtr};
          default:     avs_readdata <= '0;
        endcase
      end
      if (avs_write && region == REG_CONTROL) begin
        irq_en_rtr <= avs_writedata[0];
        irq_en_rts <= avs_writedata[1];
      end
    end
  end

`ifndef SYNTHESIS
  a_not_read_and_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(avs_read && avs_write));
`endif

endmodule
