// fp_sigmoid: logistic activation 1/(1+exp(-x)) in single precision, by the
// piecewise-linear PLAN approximation, combinational.
//
// For |x| the output is 0.25|x|+0.5 below 1, 0.125|x|+0.625 below 2.375,
// 0.03125|x|+0.84375 below 5 and 1 from 5 on; a negative x gives one minus the
// value for |x|. All slopes are powers of two, so the product is an exponent
// decrement, and the remaining work is two single-precision additions. The
// largest error against the true logistic function is about 0.019.
// The logistic shape is this design's choice of activation; the approximation
// stands in for an exponential and divider core.
module fp_sigmoid
  import nn_pkg::*;
(
  input  float32_t x,
  output float32_t y
);

  float32_t ax, scaled, offset, y_pos, y_neg;
  logic [7:0] shift;
  logic       sat;

  always_comb begin
    ax  = {1'b0, x[30:0]};
    sat = 1'b0;
    // positive floats order like their bit patterns
    if (ax >= F_FIVE) begin
      sat    = 1'b1;
      shift  = 8'd0;
      offset = F_ONE;
    end else if (ax >= F_2P375) begin
      shift  = 8'd5;
      offset = F_0P84375;
    end else if (ax >= F_ONE) begin
      shift  = 8'd3;
      offset = F_0P625;
    end else begin
      shift  = 8'd2;
      offset = F_HALF;
    end
    if (sat || ax[30:23] <= shift) begin
      scaled = F_ZERO;
    end else begin
      scaled = {1'b0, ax[30:23] - shift, ax[22:0]};
    end
  end

  fp_add u_add_seg (.a(scaled), .b(offset), .y(y_pos));
  fp_add u_add_neg (.a(F_ONE), .b({1'b1, y_pos[30:0]}), .y(y_neg));

  assign y = x[31] ? y_neg : y_pos;

endmodule
