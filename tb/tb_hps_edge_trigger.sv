// Self-checking test of hps_edge_trigger: one single-cycle pulse per rising
// edge of the level, one cycle after the level is sampled high, none for a
// level that stays high or falls.
module tb_hps_edge_trigger;
  logic clk = 0, rst, level, pulse;
  int checks = 0, failures = 0, pulses = 0;
  logic lv_q, lv_qq;

  hps_edge_trigger dut (.clk, .rst, .level, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: level sampled at each rising clock edge, previous sample kept
  initial begin
    rst = 1; level = 0; lv_q = 0; lv_qq = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (pulse != (lv_q && !lv_qq)) begin
        failures++;
        $display("FAIL cycle %0d: pulse %0b", n, pulse);
      end
      if (pulse) pulses++;
      level = ($urandom % 3 == 0) ? ~level : level;
      @(posedge clk);
      lv_qq = lv_q;
      lv_q  = level;
    end
    checks++;
    if (pulses < 100) begin failures++; $display("FAIL too few pulses: %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
