// Output layer with hard-coded weights.
//
// The single network output, the tire degradation estimate, is
//     out = B2 + sum_j W2[j] * h3[j]
// over the N_OUT third-layer values. The weights from that layer to the output
// are fixed in the hardware (parameters W2 and B2), as in the design: a newly
// trained model needs new parameter values. The default weights (each
// 1/N_OUT, bias 0: the mean of the third layer) are placeholders, since no
// trained values are published; give the trained ones when instantiating.
// No activation is applied to the output (a regression output; this design's
// choice). Each product uses fx_mul, the sum is saturated once.
//
// Interface: en loads a new result; out and valid are registered. valid stays
// high until clr.
// Timing: out/valid appear one cycle after en.
module output_layer
  import tire_nn_pkg::*;
#(
  parameter int unsigned N_OUT = 16,
  parameter fx_t W2 [N_OUT] = '{default: fx_t'((1 << FX_FRAC) / N_OUT)},
  parameter fx_t B2         = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  fx_t  h3 [N_OUT],
  output fx_t  out,
  output logic valid
);
  localparam int unsigned SW = FX_W + $clog2(N_OUT + 2);

  fx_t sum;

  always_comb begin
    logic signed [SW-1:0] s;
    s = SW'(B2);
    for (int j = 0; j < int'(N_OUT); j++) s += SW'(fx_mul(W2[j], h3[j]));
    sum = fx_sat((2*FX_W)'(s));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out   <= '0;
      valid <= 1'b0;
    end else if (en) begin
      out   <= sum;
      valid <= 1'b1;
    end else if (clr) begin
      valid <= 1'b0;
    end
  end
endmodule
