// fp_calc: floating-point calculation unit of the accelerator.
//
// Bundles the arithmetic the network needs into one unit: a multiply-add,
// mac = acc + w * x (one multiplier feeding one adder, the product rounded
// before the addition), and the activation, act = sigmoid(z). Both paths are
// combinational; the network controller registers the results, so one
// multiply-add or one activation completes per clock cycle.
// The unit plays the part of the vendor floating-point cores of the original
// system; the single-cycle timing is this design's choice.
module fp_calc
  import nn_pkg::*;
(
  input  float32_t acc,   // running sum
  input  float32_t w,     // weight
  input  float32_t x,     // neuron input
  output float32_t mac,   // acc + w*x
  input  float32_t z,     // activation argument
  output float32_t act    // sigmoid(z)
);

  float32_t prod;

  fp_mul     u_mul (.a(w),    .b(x),    .y(prod));
  fp_add     u_add (.a(acc),  .b(prod), .y(mac));
  fp_sigmoid u_act (.x(z),    .y(act));

endmodule
