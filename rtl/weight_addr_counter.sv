// Address counter that walks the weights of one NNM RAM.
//
// Counts up by one whenever inc is high and overflows to zero after reaching
// LAST, the index of the last weight in the RAM; wrap marks the increment that
// overflows. clr forces the count to zero and wins over inc. The overflow at
// the last weight follows the design; the clear input is this design's choice.
//
// Timing: count changes at the clock edge; wrap is combinational from count and
// inc.
module weight_addr_counter #(
  parameter int unsigned LAST = 32,
  localparam int unsigned AW  = (LAST > 0) ? $clog2(LAST + 1) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          inc,
  output logic [AW-1:0] count,
  output logic          wrap
);
  assign wrap = inc && (count == AW'(LAST));

  always_ff @(posedge clk) begin
    if (rst || clr)  count <= '0;
    else if (wrap)   count <= '0;
    else if (inc)    count <= count + 1'b1;
  end
endmodule
