// End-to-end test of tire_nn_top at three other network shapes, with distinct
// hard-coded output weights, using the host harness tire_nn_harness:
//   A: 2 inputs, 1 middle node, 2 third-layer nodes (smallest case)
//   B: 5 inputs, 3 middle nodes, 4 third-layer nodes, signed W2 and a bias
//   C: 3 inputs, 9 middle nodes, 7 third-layer nodes
// Each harness checks results against an integer reference and the latency
// 5 + N_IN + N_OUT; this module adds up their counts.
module tb_tire_nn_top_sizes;
  import tire_nn_pkg::*;

  localparam fx_t W2_B [4] = '{27'sd1048576, -27'sd700000, 27'sd2500000, 27'sd12345};
  localparam fx_t W2_C [7] = '{27'sd300000, 27'sd600000, -27'sd900000, 27'sd1200000,
                              -27'sd50000, 27'sd777777, 27'sd1048576};

  logic clk = 0;
  logic fin_a, fin_b, fin_c;
  int   chk_a, chk_b, chk_c, fail_a, fail_b, fail_c;
  int   checks, failures;

  always #10 clk = ~clk;

  tire_nn_harness #(.N_IN(2), .N_MID(1), .N_OUT(2)) u_a
    (.clk, .finished(fin_a), .checks(chk_a), .failures(fail_a));
  tire_nn_harness #(.N_IN(5), .N_MID(3), .N_OUT(4), .W2(W2_B), .B2(-27'sd3000000)) u_b
    (.clk, .finished(fin_b), .checks(chk_b), .failures(fail_b));
  tire_nn_harness #(.N_IN(3), .N_MID(9), .N_OUT(7), .W2(W2_C)) u_c
    (.clk, .finished(fin_c), .checks(chk_c), .failures(fail_c));

  initial begin
    fork
      begin
        repeat (100000) @(posedge clk);
        checks   = chk_a + chk_b + chk_c;
        failures = fail_a + fail_b + fail_c + 1;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      begin
        #1;
        while (!(fin_a && fin_b && fin_c)) @(posedge clk);
        checks   = chk_a + chk_b + chk_c;
        failures = fail_a + fail_b + fail_c;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end
endmodule
