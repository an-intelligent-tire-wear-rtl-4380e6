// Rising-edge trigger for a signal driven by the hard processor (HPS).
//
// The HPS controls the neural net by raising level signals (ready, weight
// write strobe). This block samples the level on the FPGA clock and emits a
// one-cycle pulse on its rising edge, so the FPGA counters and state machines
// step exactly once per HPS action without gating or mixing clocks.
// SYNC_STAGES flip-flops first bring the level into the FPGA clock domain (the
// number is this design's choice; 2 guards against a truly asynchronous
// source, 1 suffices when the HPS bridge is clocked by the same clock).
//
// Timing: pulse is high for the single cycle after the synchronised level rises.
module hps_edge_trigger #(
  parameter int unsigned SYNC_STAGES = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic level,
  output logic pulse
);
  logic [SYNC_STAGES:0] sh;

  always_ff @(posedge clk) begin
    if (rst) sh <= '0;
    else     sh <= {sh[SYNC_STAGES-1:0], level};
  end

  assign pulse = sh[SYNC_STAGES-1] & ~sh[SYNC_STAGES];
endmodule
