// Fixed-point multiplier of one NNM module.
//
// Every product an NNM needs (input times weight, ReLU'd sum times output
// weight) goes through this single multiplier, one product per clock cycle. It
// maps onto one 27x27 DSP block. The 54-bit product is shifted right by the
// fraction width and saturated to 27 bits (see tire_nn_pkg).
//
// Interface: a, b  operands; p  product.
// Timing: purely combinational; the NNM registers the result in the same cycle
// it adds it to its running sum, as the design requires.
module fxp_mul
  import tire_nn_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t p
);
  always_comb p = fx_mul(a, b);
endmodule
