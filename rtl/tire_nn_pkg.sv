// Shared types and arithmetic for the tire-wear neural network.
//
// All datapath values are 27-bit two's-complement fixed-point numbers, the
// width of one Cyclone V DSP multiplier, as the design requires. The split into
// 6 integer and 20 fraction bits (plus sign) is this design's choice: 20 fraction
// bits resolve about 1e-6, enough for results that agree with a floating-point
// reference to six decimal places. Products and sums saturate at the ends of the
// range instead of wrapping (also this design's choice).
package tire_nn_pkg;

  localparam int unsigned FX_W    = 27;  // datapath width (DSP block limit)
  localparam int unsigned FX_FRAC = 20;  // fraction bits

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_MAX = fx_t'({1'b0, {(FX_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(FX_W-1){1'b0}}});

  // Clamp a wide signed value into the fx_t range.
  function automatic fx_t fx_sat(input logic signed [2*FX_W-1:0] v);
    if (v > (2*FX_W)'(signed'(FX_MAX)))      return FX_MAX;
    else if (v < (2*FX_W)'(signed'(FX_MIN))) return FX_MIN;
    else                                      return fx_t'(v);
  endfunction

  // Fixed-point product: full 54-bit product, shifted right by the fraction
  // bits (rounding toward minus infinity), then saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = (2*FX_W)'(a) * (2*FX_W)'(b);
    return fx_sat(p >>> FX_FRAC);
  endfunction

  // Saturating fixed-point sum.
  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] s;
    s = (2*FX_W)'(a) + (2*FX_W)'(b);
    return fx_sat(s);
  endfunction

  // ReLU used on the middle-layer sum.
  function automatic fx_t fx_relu(input fx_t a);
    return a[FX_W-1] ? '0 : a;
  endfunction

  // States of the NNM sequencer (seven parts).
  typedef enum logic [2:0] {
    NNM_WRITE   = 3'd0,  // weights are written into the RAM
    NNM_STALL1  = 3'd1,  // first cycle of the two-cycle RAM read delay
    NNM_STALL2  = 3'd2,  // second cycle of the read delay
    NNM_BIAS    = 3'd3,  // bias (address 0) arrives and is loaded
    NNM_MAC     = 3'd4,  // one input product added to the sum per cycle
    NNM_OUT     = 3'd5,  // one output product per third-layer node; ReLU first
    NNM_DONE    = 3'd6   // results held, waiting for the next start
  } nnm_state_e;

endpackage
