// Third-layer summation.
//
// Each NNM delivers, for every third-layer node j, the product of its own
// middle-layer activation with the weight to node j. The value of node j is
// the sum of those products over all N_MID NNMs:
//     h3[j] = sum_m y[m][j]
// The sums are formed in a wide accumulator and saturated once at the end.
// Nodes of this layer carry no bias and no activation function, since none is
// described for them (this design's choice).
//
// Timing: combinational; the output layer registers the result.
module third_layer_sum
  import tire_nn_pkg::*;
#(
  parameter int unsigned N_MID = 64,
  parameter int unsigned N_OUT = 16
) (
  input  fx_t y  [N_MID][N_OUT],
  output fx_t h3 [N_OUT]
);
  localparam int unsigned SW = FX_W + $clog2(N_MID + 1);

  always_comb begin
    for (int j = 0; j < int'(N_OUT); j++) begin
      logic signed [SW-1:0] s;
      s = '0;
      for (int m = 0; m < int'(N_MID); m++) s += SW'(y[m][j]);
      h3[j] = fx_sat((2*FX_W)'(s));
    end
  end
endmodule
