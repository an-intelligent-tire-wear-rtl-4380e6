// Self-checking test of weight_addr_counter: counts on inc, overflows to 0
// after LAST with wrap asserted on exactly that increment, clears on clr.
module tb_weight_addr_counter;
  localparam int LAST = 32;
  logic clk = 0, rst, clr, inc;
  logic [5:0] count;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;
  int model;

  weight_addr_counter #(.LAST(LAST)) dut (.clk, .rst, .clr, .inc, .count, .wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; inc = 0; model = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("FAIL cycle %0d: count %0d expected %0d", n, count, model);
      end
      inc = ($urandom % 4 != 0);
      clr = ($urandom % 97 == 0);
      #1;
      checks++;
      if (wrap != (inc && model == LAST)) begin
        failures++;
        $display("FAIL cycle %0d: wrap %0b", n, wrap);
      end
      if (wrap) wraps++;
      if (clr)               model = 0;
      else if (inc)          model = (model == LAST) ? 0 : model + 1;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
