// Harness for one nnm instance of given sizes, used by tb_nnm_sizes.
// It loads the RAM with the address pattern (the word at address a is the
// value a, in fixed point), then computes on a few input vectors; with that
// pattern the outputs are easy to predict:
//     h = ReLU(0 + sum_i (i+1) * x[i]),   y[j] = h * (N_IN + 1 + j)
// which shows directly that each output used the right weight address. The
// start-to-done latency must be 4 + N_IN + N_OUT. Reports through its ports.
module nnm_addr_check
  import tire_nn_pkg::*;
  import tire_nn_ref_pkg::*;
#(
  parameter int N_IN  = 4,
  parameter int N_OUT = 3
) (
  input  logic clk,
  input  logic rst,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int WORDS = 1 + N_IN + N_OUT;
  localparam int LAT   = 4 + N_IN + N_OUT;

  logic wr_en, start, done, loaded;
  fx_t  wr_data;
  fx_t  x [N_IN];
  fx_t  y [N_OUT];

  nnm #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.clk, .rst, .wr_en, .wr_data, .start, .x, .y, .done, .loaded);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (N_IN=%0d N_OUT=%0d) %s", N_IN, N_OUT, msg);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    wr_en = 0; start = 0; wr_data = '0;
    for (int i = 0; i < N_IN; i++) x[i] = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    // address pattern: word a holds the value a
    for (int a = 0; a < WORDS; a++) begin
      wr_en = 1; wr_data = fx_t'(longint'(a) << 20);
      @(negedge clk);
    end
    wr_en = 0;
    check(loaded, "not loaded after the last word");
    for (int t = 0; t < 12; t++) begin
      longint h;
      int cyc;
      // inputs in steps of 1/8 between -1 and +1
      for (int i = 0; i < N_IN; i++) x[i] = fx_t'(longint'(int'($urandom % 17) - 8) << 17);
      h = 0;
      for (int i = 0; i < N_IN; i++) h = r_add(h, r_mul(longint'(i + 1) << 20, longint'(x[i])));
      h = r_relu(h);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      check(cyc == LAT, $sformatf("latency %0d, expected %0d", cyc, LAT));
      for (int j = 0; j < N_OUT; j++)
        check(longint'(y[j]) == r_mul(h, longint'(N_IN + 1 + j) << 20),
              $sformatf("y[%0d] = %0d, expected %0d", j, y[j], r_mul(h, longint'(N_IN + 1 + j) << 20)));
    end
    finished = 1;
  end
endmodule
