// buffer_out: output buffer between the network and the processor.
//
// Holds the DEPTH = NO results of one network run. The network writes each
// output by index as soon as it is computed; a valid bit per word gives the
// full flag once all NO have been written. The processor reads any word
// combinationally by index; a release pulse (the bus slave gives it when the
// last word is read) empties the buffer for the next run.
// The size follows the network's output count; the release rule is this
// design's choice.
module buffer_out
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = NO_DEF,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // network side
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  float32_t      wr_data,
  // processor side
  input  logic [AW-1:0] rd_addr,
  output float32_t      rd_data,
  input  logic          release_buf,
  // flags
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);

  float32_t   mem [DEPTH];
  logic [DEPTH-1:0] valid;
  logic       wr_ok;

  assign wr_ok = wr_en && (int'(wr_addr) < DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= F_ZERO;
      valid <= '0;
      count <= '0;
    end else begin
      if (wr_ok) begin
        mem[wr_addr] <= wr_data;
      end
      if (release_buf) begin
        valid <= '0;
        count <= '0;
      end else if (wr_ok && !valid[wr_addr]) begin
        valid[wr_addr] <= 1'b1;
        count          <= count + 1'b1;
      end
    end
  end

  assign rd_data = (int'(rd_addr) < DEPTH) ? mem[rd_addr] : F_ZERO;
  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));

endmodule
