// fp_add: IEEE-754 single-precision adder, combinational.
//
// The operand of larger magnitude (hi_op) is taken as the reference; the other
// significand is aligned to it by a right shift that keeps guard, round and
// sticky bits. Significands are added or subtracted by the signs, the result
// is normalised (one right shift after a carry, or a left shift by the count
// of leading zeros after a cancellation) and rounded to nearest, ties to even.
// Subnormal inputs are read as zero and subnormal results are flushed to zero;
// overflow gives infinity; an exact cancellation gives +0. NaN is not handled.
// These simplifications are this design's choice. Result appears in the same
// cycle as the operands.
module fp_add
  import nn_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  float32_t    hi_op, lo_op;
  logic [7:0]  ediff;
  logic [26:0] mhi, mlo, msh;      // hidden, 23 fraction bits, G, R, S
  logic        sticky;
  logic [27:0] sum;
  logic signed [9:0] exp_n;
  logic [26:0] norm;
  int unsigned lz;
  logic [23:0] mant;
  logic [24:0] mant_r;
  logic        round_up;

  always_comb begin
    // order by magnitude
    if (a[30:0] >= b[30:0]) begin
      hi_op   = a;
      lo_op = b;
    end else begin
      hi_op   = b;
      lo_op = a;
    end
    mhi   = (hi_op[30:23]   == 8'd0) ? 27'd0 : {1'b1, hi_op[22:0],   3'b000};
    mlo = (lo_op[30:23] == 8'd0) ? 27'd0 : {1'b1, lo_op[22:0], 3'b000};
    ediff  = hi_op[30:23] - lo_op[30:23];

    // alignment shift with sticky collection
    if (ediff >= 8'd27) begin
      msh    = 27'd0;
      sticky = |mlo;
    end else begin
      msh    = mlo >> ediff;
      sticky = |(mlo & ((27'd1 << ediff) - 27'd1));
    end
    msh[0] = msh[0] | sticky;

    if (hi_op[31] == lo_op[31]) begin
      sum = {1'b0, mhi} + {1'b0, msh};
    end else begin
      sum = {1'b0, mhi} - {1'b0, msh};
    end

    exp_n = $signed({2'b00, hi_op[30:23]});
    norm  = sum[26:0];
    lz    = 0;
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = norm[0] | sum[0];
      exp_n = exp_n + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 26 - i;
          break;
        end
      end
      norm  = 27'(sum << lz);
      exp_n = exp_n - 10'(lz);
    end

    mant     = norm[26:3];
    round_up = norm[2] & ((norm[1] | norm[0]) | norm[3]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = {1'b0, mant_r[24:1]};
      exp_n  = exp_n + 10'sd1;
    end

    if (sum == 28'd0 || mhi == 27'd0) begin
      // exact cancellation, or both operands zero
      y = (mhi == 27'd0) ? {hi_op[31] & lo_op[31], 31'd0} : 32'd0;
    end else if (exp_n <= 0) begin
      y = {hi_op[31], 31'd0};
    end else if (exp_n >= 10'sd255) begin
      y = {hi_op[31], 8'hFF, 23'd0};
    end else begin
      y = {hi_op[31], exp_n[7:0], mant_r[22:0]};
    end
  end

endmodule
