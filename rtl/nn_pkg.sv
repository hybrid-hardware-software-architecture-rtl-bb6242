// nn_pkg: sizes, types and constants shared by the neural-network accelerator.
//
// The accelerator evaluates a fully connected network with NI inputs, two
// hidden layers of NH neurons each and NO outputs. Its defaults are the 4-10-3
// network used for the iris data set (two hidden layers of ten). The number of
// weights and biases, D, follows (NI+1)*NH + (NH+1)*NH + (NH+1)*NO, and the
// input buffer holds D weights followed by NI input values, all as IEEE-754
// single-precision words. The float constants below are the ones the
// activation function uses; the register map of the bus slave is this
// design's own.
package nn_pkg;

  typedef logic [31:0] float32_t;

  localparam int unsigned NI_DEF = 4;
  localparam int unsigned NH_DEF = 10;
  localparam int unsigned NO_DEF = 3;

  // Number of weights and biases of the two-hidden-layer network.
  function automatic int unsigned calc_d(int unsigned ni, int unsigned nh, int unsigned no);
    return (ni + 1) * nh + (nh + 1) * nh + (nh + 1) * no;
  endfunction

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Single-precision constants.
  localparam float32_t F_ZERO    = 32'h0000_0000;
  localparam float32_t F_HALF    = 32'h3F00_0000; // 0.5
  localparam float32_t F_0P625   = 32'h3F20_0000; // 0.625
  localparam float32_t F_0P84375 = 32'h3F58_0000; // 0.84375
  localparam float32_t F_ONE     = 32'h3F80_0000; // 1.0
  localparam float32_t F_2P375   = 32'h4018_0000; // 2.375
  localparam float32_t F_FIVE    = 32'h40A0_0000; // 5.0

  // Bus regions, selected by the two top address bits of the slave.
  typedef enum logic [1:0] {
    REG_BUF_IN  = 2'd0,
    REG_BUF_OUT = 2'd1,
    REG_STATUS  = 2'd2,
    REG_CONTROL = 2'd3
  } region_e;

  // Status word layout.
  typedef struct packed {
    logic [15:0] in_count;
    logic [7:0]  out_count;
    logic [4:0]  reserved2;
    logic        busy;
    logic        ready_to_send;
    logic        ready_to_receive;
  } status_t;

endpackage
