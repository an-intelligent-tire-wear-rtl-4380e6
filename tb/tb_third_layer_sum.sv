// Self-checking test of third_layer_sum: random NNM products, including sums
// that must saturate, against an integer reference.
module tb_third_layer_sum;
  import tire_nn_pkg::*;
  import tire_nn_ref_pkg::*;
  localparam int N_MID = 8, N_OUT = 5;
  fx_t y [N_MID][N_OUT];
  fx_t h3 [N_OUT];
  int checks = 0, failures = 0;

  third_layer_sum #(.N_MID(N_MID), .N_OUT(N_OUT)) dut (.y, .h3);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      longint rng;
      rng = (t % 5 == 0) ? (longint'(1) << 26) : (longint'(1) << 22);
      for (int m = 0; m < N_MID; m++)
        for (int j = 0; j < N_OUT; j++) y[m][j] = fx_t'(r_rand(rng));
      #1;
      for (int j = 0; j < N_OUT; j++) begin
        longint s;
        s = 0;
        for (int m = 0; m < N_MID; m++) s += longint'(y[m][j]);
        checks++;
        if (longint'(h3[j]) != r_sat(s)) begin
          failures++;
          $display("FAIL node %0d: got %0d expected %0d", j, h3[j], r_sat(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
