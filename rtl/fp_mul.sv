// fp_mul: IEEE-754 single-precision multiplier, combinational.
//
// The two 24-bit significands (hidden one restored) are multiplied into a
// 48-bit product, normalised by at most one position and rounded to nearest,
// ties to even. Exponents are added and re-biased. Subnormal inputs are read as
// zero and subnormal results are flushed to zero; results that overflow become
// infinity of the right sign. NaN is not produced or propagated: an exponent of
// 255 is treated as a large number. These simplifications are this design's
// choice; the network's weights and activations stay far from those ranges.
// Result appears in the same cycle as the operands.
module fp_mul
  import nn_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  logic        sign;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic signed [10:0] exp_sum;
  logic [22:0] mant;
  logic        guard, sticky, round_up;
  logic [23:0] mant_r;
  logic signed [10:0] exp_r;
  logic        a_zero, b_zero;

  always_comb begin
    sign    = a[31] ^ b[31];
    a_zero  = (a[30:23] == 8'd0);
    b_zero  = (b[30:23] == 8'd0);
    ma      = {1'b1, a[22:0]};
    mb      = {1'b1, b[22:0]};
    prod    = ma * mb;
    exp_sum = $signed({3'b000, a[30:23]}) + $signed({3'b000, b[30:23]}) - 11'sd127;
    if (prod[47]) begin
      mant    = prod[46:24];
      guard   = prod[23];
      sticky  = |prod[22:0];
      exp_sum = exp_sum + 11'sd1;
    end else begin
      mant    = prod[45:23];
      guard   = prod[22];
      sticky  = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {23'd0, round_up};
    exp_r    = exp_sum;
    if (mant_r[23]) begin
      exp_r = exp_r + 11'sd1;
    end
    if (a_zero || b_zero || exp_r <= 0) begin
      y = {sign, 31'd0};
    end else if (exp_r >= 11'sd255) begin
      y = {sign, 8'hFF, 23'd0};
    end else begin
      y = {sign, exp_r[7:0], mant_r[22:0]};
    end
  end

endmodule
