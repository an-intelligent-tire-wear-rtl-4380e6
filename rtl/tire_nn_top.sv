// Tire-wear neural network accelerator: FPGA side of an HPS + FPGA system.
//
// A small fully connected network estimates the remaining tire life (tire
// degradation, in percent) from per-lap race data. The network is
//     N_IN inputs -> N_MID middle nodes (ReLU) -> N_OUT third-layer nodes
//                 -> 1 output (hard-coded weights)
// The middle layer is by far the widest, so it is computed in parallel: one
// NNM module per middle node, each with its own weight RAM and a single
// multiplier, all stepping in lockstep. Their products are summed per
// third-layer node (third_layer_sum) and the output node applies fixed
// weights (output_layer).
//
// Host interface (the HPS drives these as plain level signals; every action is
// taken on a rising edge, detected on the FPGA clock by hps_edge_trigger):
//   hps_wr, hps_wr_data  each rising edge of hps_wr writes one weight word; the
//                        words go to NNM 0, 1, ... in turn (weight_loader).
//                        After the last word every NNM computes once on
//                        hps_x and the first result appears.
//   hps_x                network inputs, held by the HPS during a computation
//   hps_ready            rising edge: drop valid, return every NNM to its first
//                        read state and compute on the present hps_x
//   fpga_valid, fpga_data result handshake: valid rises with a new result and
//                        stays high until the next ready edge
//   weights_loaded       all weights have been written
// Timing: fpga_valid rises 37 clock cycles after the cycle in which the ready
// edge is detected (4 + N_IN + N_OUT cycles in the NNMs, one in the output
// layer; 37 with the default sizes), a fixed latency independent of the data.
//
// Follows the design: the parallel NNM array, per-NNM RAM and multiplier, the
// 27-bit fixed point, the rising-edge ready/valid handshake, the hard-coded
// output weights and the 37-cycle latency. This design's own choices: the layer
// sizes (N_IN = N_OUT = 16 reproduce the 37 cycles; N_MID = 64 keeps the 80
// multipliers within the device's 87 DSP blocks), the weight stream order, and
// computing once right after loading.
module tire_nn_top
  import tire_nn_pkg::*;
#(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_MID = 64,
  parameter int unsigned N_OUT = 16,
  parameter fx_t W2 [N_OUT] = '{default: fx_t'((1 << FX_FRAC) / N_OUT)},
  parameter fx_t B2         = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic hps_wr,
  input  fx_t  hps_wr_data,
  input  fx_t  hps_x [N_IN],
  input  logic hps_ready,
  output logic fpga_valid,
  output fx_t  fpga_data,
  output logic weights_loaded
);
  localparam int unsigned WORDS = 1 + N_IN + N_OUT;

  logic             wr_pulse, ready_pulse;
  logic [N_MID-1:0] nnm_wr_en, nnm_done, nnm_loaded;
  fx_t              y  [N_MID][N_OUT];
  fx_t              h3 [N_OUT];
  logic             start, all_done, all_done_q, out_en;

  hps_edge_trigger u_wr_edge    (.clk, .rst, .level(hps_wr),    .pulse(wr_pulse));
  hps_edge_trigger u_ready_edge (.clk, .rst, .level(hps_ready), .pulse(ready_pulse));

  weight_loader #(.N_MID(N_MID), .WORDS(WORDS)) u_loader (
    .clk, .rst,
    .wr_pulse (wr_pulse),
    .wr_en    (nnm_wr_en),
    .nnm_index(),
    .done     (weights_loaded)
  );

  assign start = ready_pulse && weights_loaded;

  for (genvar m = 0; m < int'(N_MID); m++) begin : g_nnm
    nnm #(.N_IN(N_IN), .N_OUT(N_OUT)) u_nnm (
      .clk, .rst,
      .wr_en  (nnm_wr_en[m]),
      .wr_data(hps_wr_data),
      .start  (start),
      .x      (hps_x),
      .y      (y[m]),
      .done   (nnm_done[m]),
      .loaded (nnm_loaded[m])
    );
  end

  third_layer_sum #(.N_MID(N_MID), .N_OUT(N_OUT)) u_sum (.y(y), .h3(h3));

  assign all_done = &nnm_done;

  always_ff @(posedge clk) begin
    if (rst) all_done_q <= 1'b0;
    else     all_done_q <= all_done && !start;
  end

  assign out_en = all_done && !all_done_q && !start;

  output_layer #(.N_OUT(N_OUT), .W2(W2), .B2(B2)) u_out (
    .clk, .rst,
    .en   (out_en),
    .clr  (ready_pulse),
    .h3   (h3),
    .out  (fpga_data),
    .valid(fpga_valid)
  );

  // Handshake rule: once raised, valid stays high until the next ready edge.
  a_valid_held: assert property (@(posedge clk) disable iff (rst)
                                 fpga_valid && !ready_pulse |=> fpga_valid);
  // A result is only taken when every NNM has finished.
  a_out_all_done: assert property (@(posedge clk) disable iff (rst)
                                   out_en |-> (&nnm_loaded));
endmodule
