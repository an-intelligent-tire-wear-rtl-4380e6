// Self-checking test of weight_loader: a stream of write pulses is routed
// WORDS at a time to NNM 0, 1, ... (one-hot wr_en), and done rises after the
// last word of the last NNM, after which pulses are ignored.
module tb_weight_loader;
  localparam int N_MID = 5, WORDS = 7;
  logic clk = 0, rst, wr_pulse, done;
  logic [N_MID-1:0] wr_en;
  logic [2:0] nnm_index;
  int checks = 0, failures = 0;
  int count [N_MID];
  int sent;

  weight_loader #(.N_MID(N_MID), .WORDS(WORDS)) dut (.clk, .rst, .wr_pulse, .wr_en, .nnm_index, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_pulse = 0; sent = 0;
    count = '{default: 0};
    repeat (2) @(negedge clk);
    rst = 0;
    while (sent < N_MID * WORDS + 10) begin
      @(negedge clk);
      wr_pulse = ($urandom % 3 == 0);
      #1;
      checks++;
      if (sent < N_MID * WORDS) begin
        automatic logic [N_MID-1:0] exp = wr_pulse ? (N_MID'(1) << (sent / WORDS)) : '0;
        if (wr_en != exp || done) begin
          failures++;
          $display("FAIL word %0d: wr_en %b expected %b done %0b", sent, wr_en, exp, done);
        end
      end else if (wr_en != '0 || !done) begin
        failures++;
        $display("FAIL after load: wr_en %b done %0b", wr_en, done);
      end
      for (int m = 0; m < N_MID; m++) if (wr_en[m]) count[m]++;
      if (wr_pulse) sent++;
    end
    for (int m = 0; m < N_MID; m++) begin
      checks++;
      if (count[m] != WORDS) begin failures++; $display("FAIL NNM %0d got %0d words", m, count[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
