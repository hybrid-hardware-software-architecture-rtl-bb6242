// tb_fp_ref_pkg: reference arithmetic for the testbenches, built on the
// simulator's double-precision reals rather than on the design's units.
// f2r converts a single-precision pattern to a real exactly; r2f rounds a
// real to single precision (nearest, ties to even, subnormals flushed to zero,
// overflow to infinity); plan_ref is the PLAN logistic approximation with
// the same rounding points as a single-precision datapath; sigmoid_true is
// 1/(1+exp(-x)).
package tb_fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random float with unbiased exponent in [emin, emax] and random sign.
  function automatic logic [31:0] rand_float(int emin, int emax);
    int e;
    e = emin + int'($urandom % 32'(emax - emin + 1));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  function automatic logic [31:0] plan_ref(logic [31:0] x);
    real ax, slope, off, ypos;
    logic [31:0] yp;
    ax = f2r({1'b0, x[30:0]});
    if (ax >= 5.0) begin
      yp = 32'h3F80_0000;
    end else begin
      if (ax >= 2.375) begin slope = 0.03125; off = 0.84375; end
      else if (ax >= 1.0) begin slope = 0.125; off = 0.625; end
      else begin slope = 0.25; off = 0.5; end
      ypos = f2r(r2f(ax * slope)) + off;
      yp   = r2f(ypos);
    end
    if (x[31]) return r2f(1.0 - f2r(yp));
    return yp;
  endfunction

  function automatic real sigmoid_true(real x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

  // Reference evaluation of the NI-NH-NH-NO network from a buffer image:
  // D weights (per neuron its bias, then one weight per input of the layer,
  // neurons and layers in order) followed by NI inputs. Products and sums are
  // rounded to single precision in the order the hardware performs them.
  function automatic void nn_ref(int ni, int nh, int no, logic [31:0] words [],
                                 ref logic [31:0] outs []);
    logic [31:0] xin [], xout [];
    int ptr, d, fan, nodes;
    logic [31:0] acc, p;
    d   = (ni + 1) * nh + (nh + 1) * nh + (nh + 1) * no;
    xin = new[ni];
    for (int i = 0; i < ni; i++) xin[i] = words[d + i];
    ptr = 0;
    for (int layer = 0; layer < 3; layer++) begin
      fan   = (layer == 0) ? ni : nh;
      nodes = (layer == 2) ? no : nh;
      xout  = new[nodes];
      for (int n = 0; n < nodes; n++) begin
        acc = words[ptr++];
        for (int i = 0; i < fan; i++) begin
          p   = r2f(f2r(words[ptr++]) * f2r(xin[i]));
          acc = r2f(f2r(acc) + f2r(p));
        end
        xout[n] = plan_ref(acc);
      end
      xin = xout;
    end
    outs = xin;
  endfunction

endpackage
