// End-to-end test of tire_nn_top at its default sizes (16 inputs, 64 middle
// nodes, 16 third-layer nodes, default output weights).
//
// The testbench plays the host processor: it streams all 64 x 33 weight words
// with rising edges of hps_wr, then runs race laps, each with one inference per
// driver (7 drivers, as on the race scoreboard): set the inputs, raise ready,
// wait for valid, read the result, lower ready. Every result is compared with
// an integer reference of the whole network, and valid must rise 37 cycles
// after the cycle in which the ready edge is detected (38 after ready is
// raised). The mechanisms of the design are counted and each must occur:
// weight writes, the first computation right after loading, ready edges,
// stall cycles, overflow of the weight address counter, ReLU clamping of a
// negative middle-layer sum, a ready edge during a computation (restart), a
// ready edge while weights are still loading (ignored), and a level of ready
// held high (no second computation).
module tb_tire_nn_top;
  import tire_nn_pkg::*;
  import tire_nn_ref_pkg::*;
  localparam int N_IN = 16, N_MID = 64, N_OUT = 16, WORDS = 1 + N_IN + N_OUT;
  localparam int LATENCY = 37;
  localparam int DRIVERS = 7, LAPS = 5;
  localparam longint W2 = (longint'(1) << 20) / N_OUT;   // default output weights

  logic clk = 0, rst, hps_wr, hps_ready, fpga_valid, weights_loaded;
  fx_t  hps_wr_data, fpga_data;
  fx_t  hps_x [N_IN];
  longint w [N_MID][WORDS];
  int checks = 0, failures = 0;
  int n_writes = 0, n_ready = 0, n_results = 0, n_restart = 0, n_ignored = 0, n_held = 0;
  int n_stall1 = 0, n_stall2 = 0, n_wrap = 0, n_relu = 0, n_first = 0;

  tire_nn_top dut (.clk, .rst, .hps_wr, .hps_wr_data, .hps_x, .hps_ready,
                   .fpga_valid, .fpga_data, .weights_loaded);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the sequencer and address counter of middle node 0.
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.g_nnm[0].u_nnm.state == NNM_STALL1) n_stall1++;
      if (dut.g_nnm[0].u_nnm.state == NNM_STALL2) n_stall2++;
      if (dut.g_nnm[0].u_nnm.addr_wrap)           n_wrap++;
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic longint ref_net();
    longint h3 [N_OUT];
    longint out;
    h3 = '{default: 0};
    for (int m = 0; m < N_MID; m++) begin
      longint acc;
      acc = w[m][0];
      for (int i = 0; i < N_IN; i++) acc = r_add(acc, r_mul(longint'(hps_x[i]), w[m][1 + i]));
      if (acc < 0) n_relu++;
      acc = r_relu(acc);
      for (int j = 0; j < N_OUT; j++) h3[j] += r_mul(acc, w[m][1 + N_IN + j]);
    end
    out = 0;
    for (int j = 0; j < N_OUT; j++) out += r_mul(W2, r_sat(h3[j]));
    return r_sat(out);
  endfunction

  task automatic set_inputs(int lap, int driver);
    // synthetic per-lap race features, scaled to about +-2.0
    for (int i = 0; i < N_IN; i++) hps_x[i] = fx_t'(r_rand(longint'(1) << 21));
    hps_x[0] = fx_t'(longint'(lap) << 16);
    hps_x[1] = fx_t'(longint'(driver) << 17);
  endtask

  task automatic write_word(fx_t d);
    hps_wr_data = d;
    hps_wr = 1;
    repeat (1 + $urandom % 2) @(negedge clk);
    hps_wr = 0;
    repeat (1 + $urandom % 2) @(negedge clk);
    n_writes++;
  endtask

  task automatic pulse_ready();
    hps_ready = 1;
    @(negedge clk);
    n_ready++;
  endtask

  // Raise ready, wait for valid, check latency and data, lower ready.
  task automatic infer(string tag);
    int cyc;
    longint exp;
    exp = ref_net();
    hps_ready = 1;
    n_ready++;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
      if (cyc == 2) check(!fpga_valid, {tag, ": valid not dropped by ready"});
    end while (!(fpga_valid && cyc > 2) && cyc < 500);
    check(cyc - 1 == LATENCY, $sformatf("%s: latency %0d, expected %0d", tag, cyc - 1, LATENCY));
    check(longint'(fpga_data) == exp, $sformatf("%s: result %0d, expected %0d", tag, fpga_data, exp));
    n_results++;
    // ready still high: no second computation may start
    repeat (50) @(negedge clk);
    check(fpga_valid && longint'(fpga_data) == exp, {tag, ": result not held"});
    n_held++;
    hps_ready = 0;
    repeat (1 + $urandom % 3) @(negedge clk);
  endtask

  initial begin
    rst = 1; hps_wr = 0; hps_ready = 0; hps_wr_data = '0;
    set_inputs(0, 0);
    repeat (4) @(negedge clk);
    rst = 0;

    // ---- weight stream; a ready edge in the middle is ignored
    for (int m = 0; m < N_MID; m++)
      for (int a = 0; a < WORDS; a++) w[m][a] = r_rand(longint'(1) << 20);
    for (int m = 0; m < N_MID; m++) begin
      for (int a = 0; a < WORDS; a++) begin
        write_word(fx_t'(w[m][a]));
        if (m == N_MID / 2 && a == 3) begin
          pulse_ready();
          hps_ready = 0;
          n_ignored++;
          @(negedge clk);
        end
      end
      check((m == N_MID - 1) == weights_loaded, $sformatf("weights_loaded after NNM %0d", m));
      check(!fpga_valid, "valid during loading");
    end

    // ---- first result, computed right after the last weight
    begin
      int cyc;
      longint exp;
      exp = ref_net();
      cyc = 0;
      while (!fpga_valid && cyc < 200) begin @(negedge clk); cyc++; end
      check(fpga_valid && longint'(fpga_data) == exp,
            $sformatf("first result %0d, expected %0d", fpga_data, exp));
      n_first++;
    end

    // ---- race laps: one inference per driver
    for (int lap = 1; lap <= LAPS; lap++)
      for (int d = 0; d < DRIVERS; d++) begin
        set_inputs(lap, d);
        infer($sformatf("lap %0d driver %0d", lap, d));
      end

    // ---- ready edge in the middle of a computation restarts it
    for (int t = 0; t < 3; t++) begin
      set_inputs(99, t);
      pulse_ready();
      repeat (5 + 8 * t) @(negedge clk);
      hps_ready = 0;
      @(negedge clk);
      check(!fpga_valid, "valid during computation");
      set_inputs(100, t);
      n_restart++;
      infer($sformatf("restart %0d", t));
    end

    $display("writes %0d ready %0d results %0d first %0d restarts %0d ignored %0d held %0d",
             n_writes, n_ready, n_results, n_first, n_restart, n_ignored, n_held);
    $display("stall1 %0d stall2 %0d counter overflows %0d relu clamps %0d",
             n_stall1, n_stall2, n_wrap, n_relu);
    check(n_writes == N_MID * WORDS, "weight write count");
    check(n_first > 0, "no computation after loading");
    check(n_results == LAPS * DRIVERS + 3, "result count");
    check(n_restart > 0 && n_ignored > 0 && n_held > 0, "handshake cases missing");
    check(n_stall1 > 0 && n_stall2 > 0, "no stall cycles");
    check(n_wrap > 1, "no address counter overflow during computation");
    check(n_relu > 0, "no negative middle-layer sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
