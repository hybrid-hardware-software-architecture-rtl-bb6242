// buffer_in: input buffer between the processor and the network.
//
// Holds DEPTH = D + NI single-precision words: the D weights and biases of the
// network followed by the NI values of one input sample. The processor side
// writes words by address; a valid bit per word records which have arrived,
// and a counter of valid words gives the empty and full flags. Writing the
// same address twice counts once. The network side reads one word per cycle
// through a synchronous port (data one cycle after the address). A clear
// pulse, given when the network has finished, empties the buffer; the stored
// words stay readable but must all be written again before the next run.
// The size D + NI follows the original system; the per-word valid bits and
// the clear-on-finish behaviour are this design's choices.
module buffer_in
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = calc_d(NI_DEF, NH_DEF, NO_DEF) + NI_DEF,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  float32_t      wr_data,
  // network side
  input  logic [AW-1:0] rd_addr,
  output float32_t      rd_data,
  input  logic          clear,
  // flags
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);

  float32_t   mem [DEPTH];
  logic [DEPTH-1:0] valid;
  logic       wr_ok;

  assign wr_ok = wr_en && (int'(wr_addr) < DEPTH);

  always_ff @(posedge clk) begin
    if (wr_ok) begin
      mem[wr_addr] <= wr_data;
    end
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      count <= '0;
    end else if (clear) begin
      valid <= '0;
      count <= '0;
    end else if (wr_ok && !valid[wr_addr]) begin
      valid[wr_addr] <= 1'b1;
      count          <= count + 1'b1;
    end
  end

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

`ifndef SYNTHESIS
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    full |-> !(wr_ok && !valid[wr_addr]));
`endif

endmodule
