// Self-checking test of output_layer with distinct hard-coded weights:
// out = B2 + sum W2[j]*h3[j] (products floored, sum saturated), loaded one
// cycle after en; valid held until clr.
module tb_output_layer;
  import tire_nn_pkg::*;
  import tire_nn_ref_pkg::*;
  localparam int N_OUT = 6;
  localparam fx_t W2 [N_OUT] = '{27'sd1048576, -27'sd524288, 27'sd262144,
                                 27'sd3145728, -27'sd100000, 27'sd77777};
  localparam fx_t B2 = 27'sd1234567;
  logic clk = 0, rst, en, clr, valid;
  fx_t h3 [N_OUT];
  fx_t out;
  int checks = 0, failures = 0;

  output_layer #(.N_OUT(N_OUT), .W2(W2), .B2(B2)) dut (.clk, .rst, .en, .clr, .h3, .out, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; clr = 0;
    h3 = '{default: '0};
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid after reset"); end
    for (int t = 0; t < 300; t++) begin
      longint s;
      for (int j = 0; j < N_OUT; j++) h3[j] = fx_t'(r_rand((t % 7 == 0) ? (longint'(1) << 26) : (longint'(1) << 23)));
      s = longint'(B2);
      for (int j = 0; j < N_OUT; j++) s += r_mul(longint'(W2[j]), longint'(h3[j]));
      en = 1;
      @(negedge clk);
      en = 0;
      for (int j = 0; j < N_OUT; j++) h3[j] = '0;   // output must hold
      @(negedge clk);
      checks += 2;
      if (longint'(out) != r_sat(s)) begin
        failures++;
        $display("FAIL t=%0d: got %0d expected %0d", t, out, r_sat(s));
      end
      if (!valid) begin failures++; $display("FAIL valid low"); end
      clr = 1;
      @(negedge clk);
      clr = 0;
      checks++;
      if (valid) begin failures++; $display("FAIL valid not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
