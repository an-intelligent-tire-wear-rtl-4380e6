// Weight loader: hands the weight stream written by the HPS to the NNMs.
//
// The HPS streams every weight of the network, one word per write pulse, in
// NNM order: the WORDS words of NNM 0 (bias, input weights, output weights, the
// layout of its RAM), then those of NNM 1, and so on. The loader keeps a word
// counter that overflows after WORDS-1 (the same overflowing counter each NNM
// uses to address its RAM) and an NNM index that advances on each overflow.
// wr_en is one-hot: the pulse goes to the NNM being filled; wr_data is shared.
// After the last word of the last NNM, done rises and further pulses are
// ignored until reset.
//
// Streaming the weights from the HPS follows the design; the order of the
// stream and this routing logic are this design's choice.
// Timing: wr_en is combinational from wr_pulse; counters step at the edge.
module weight_loader
  import tire_nn_pkg::*;
#(
  parameter int unsigned N_MID = 64,
  parameter int unsigned WORDS = 33,
  localparam int unsigned IW   = (N_MID > 1) ? $clog2(N_MID) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_pulse,
  output logic [N_MID-1:0] wr_en,
  output logic [IW-1:0]    nnm_index,
  output logic             done
);
  logic word_wrap;
  logic go;

  assign go = wr_pulse && !done;

  weight_addr_counter #(.LAST(WORDS - 1)) u_word (
    .clk, .rst,
    .clr  (1'b0),
    .inc  (go),
    .count(),
    .wrap (word_wrap)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      nnm_index <= '0;
      done      <= 1'b0;
    end else if (word_wrap) begin
      if (nnm_index == IW'(N_MID - 1)) done <= 1'b1;
      else                             nnm_index <= nnm_index + 1'b1;
    end
  end

  always_comb begin
    wr_en = '0;
    if (go) wr_en[nnm_index] = 1'b1;
  end
endmodule
