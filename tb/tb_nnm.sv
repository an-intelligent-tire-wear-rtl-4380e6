// Self-checking test of nnm at its default sizes (16 inputs, 16 outputs).
// Weights are written through the write stream, then the node computes on
// random inputs; every output is compared with an integer reference of
// ReLU(bias + sum w_in*x) * w_out[j], and the start-to-done latency must be
// 4 + N_IN + N_OUT cycles. Also covered: the automatic computation after
// loading, ignored starts while loading, a restart in the middle of a
// computation, negative sums clamped by the ReLU, and a reload after reset.
module tb_nnm;
  import tire_nn_pkg::*;
  import tire_nn_ref_pkg::*;
  localparam int N_IN = 16, N_OUT = 16, WORDS = 1 + N_IN + N_OUT;
  localparam int LAT = 4 + N_IN + N_OUT;

  logic clk = 0, rst, wr_en, start, done, loaded;
  fx_t  wr_data;
  fx_t  x [N_IN];
  fx_t  y [N_OUT];
  longint w [WORDS];
  int checks = 0, failures = 0, relu_clamps = 0, relu_pass = 0;

  nnm #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.clk, .rst, .wr_en, .wr_data, .start, .x, .y, .done, .loaded);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic check_outputs();
    longint acc;
    acc = w[0];
    for (int i = 0; i < N_IN; i++) acc = r_add(acc, r_mul(longint'(x[i]), w[1 + i]));
    if (acc < 0) relu_clamps++; else relu_pass++;
    acc = r_relu(acc);
    for (int j = 0; j < N_OUT; j++)
      check(longint'(y[j]) == r_mul(acc, w[1 + N_IN + j]),
            $sformatf("y[%0d] = %0d, expected %0d", j, y[j], r_mul(acc, w[1 + N_IN + j])));
  endtask

  task automatic random_inputs();
    for (int i = 0; i < N_IN; i++) x[i] = fx_t'(r_rand(longint'(1) << 21));
  endtask

  // Wait for done; cycles counts the clock cycles after the one in which the
  // caller last changed the inputs (the start cycle), up to the first with done.
  task automatic wait_done(output int cycles);
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!done && cycles < 1000);
  endtask

  task automatic load_weights();
    for (int a = 0; a < WORDS; a++) w[a] = r_rand(longint'(1) << 21);
    for (int a = 0; a < WORDS; a++) begin
      repeat ($urandom % 3) @(negedge clk);
      // a start while loading must be ignored
      start = ($urandom % 4 == 0);
      wr_en = 1; wr_data = fx_t'(w[a]);
      @(negedge clk);
      check(!done, "done during loading");
      wr_en = 0; start = 0;
      if (a < WORDS - 1) check(!loaded, "loaded too early");
    end
    check(loaded, "loaded not set");
  endtask

  initial begin
    int cyc;
    rst = 1; wr_en = 0; start = 0; wr_data = '0;
    random_inputs();
    repeat (3) @(negedge clk);
    rst = 0;

    // load, then the node computes once on the present inputs
    load_weights();
    wait_done(cyc);
    check(cyc == LAT - 1, $sformatf("first computation took %0d cycles", cyc + 1));
    check_outputs();

    // computations started by a start pulse
    for (int t = 0; t < 60; t++) begin
      random_inputs();
      if (t % 3 == 0) for (int i = 0; i < N_IN; i++) x[i] = fx_t'(-longint'(x[i]) + 0);
      start = 1;
      @(negedge clk);
      start = 0;
      wait_done(cyc);
      check(cyc + 1 == LAT, $sformatf("latency %0d, expected %0d", cyc + 1, LAT));
      check_outputs();
      repeat ($urandom % 4) @(negedge clk);
      check(done, "done not held");
    end

    // restart in the middle of a computation
    for (int t = 0; t < 10; t++) begin
      random_inputs();
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (1 + $urandom % (LAT - 2)) @(negedge clk);
      check(!done, "done too early");
      random_inputs();
      start = 1;
      @(negedge clk);
      start = 0;
      wait_done(cyc);
      check(cyc + 1 == LAT, $sformatf("latency after restart %0d", cyc + 1));
      check_outputs();
    end

    // reset returns the node to weight loading with new weights
    rst = 1;
    @(negedge clk);
    rst = 0;
    check(!loaded && !done, "reset did not return to loading");
    load_weights();
    wait_done(cyc);
    check_outputs();
    for (int t = 0; t < 20; t++) begin
      random_inputs();
      start = 1;
      @(negedge clk);
      start = 0;
      wait_done(cyc);
      check(cyc + 1 == LAT, "latency after reload");
      check_outputs();
    end

    check(relu_clamps > 0, "no negative sum was clamped");
    check(relu_pass > 0, "no positive sum seen");
    $display("relu clamps %0d, positive sums %0d", relu_clamps, relu_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
