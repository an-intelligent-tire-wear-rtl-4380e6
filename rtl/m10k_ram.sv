// Weight memory of one NNM module, modelled on an M10K embedded RAM block.
//
// Simple dual-port RAM: one synchronous write port and one read port with a
// two-cycle read delay (address registered, then data registered), which is the
// delay the NNM state machine covers with its two stall cycles. An address
// presented in cycle t gives its data on rd_data in cycle t+2.
//
// Interface: wr_en/wr_addr/wr_data write a word at the clock edge; rd_addr is
// sampled every cycle; rd_data holds the word read two cycles earlier.
// The registered read and the depth of one word per weight follow the design;
// the separate write address is this implementation's choice.
module m10k_ram #(
  parameter int unsigned WIDTH = 27,
  parameter int unsigned DEPTH = 33,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_addr_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_addr_q <= rd_addr;
    rd_data   <= mem[rd_addr_q];
  end
endmodule
