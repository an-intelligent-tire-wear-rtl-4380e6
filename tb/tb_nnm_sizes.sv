// Test of nnm for a range of input and third-layer sizes with the address
// pattern in its RAM (word a holds the value a), so every output shows which
// weight address it was computed from. Sizes (N_IN, N_OUT): (1,1), (2,5),
// (7,2), (3,3), (16,16), (24,8).
module tb_nnm_sizes;
  localparam int NCFG = 6;
  logic clk = 0, rst;
  logic fin [NCFG];
  int   chk [NCFG], fl [NCFG];
  int   checks, failures;

  always #5 clk = ~clk;

  nnm_addr_check #(.N_IN(1),  .N_OUT(1))  u0 (.clk, .rst, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  nnm_addr_check #(.N_IN(2),  .N_OUT(5))  u1 (.clk, .rst, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  nnm_addr_check #(.N_IN(7),  .N_OUT(2))  u2 (.clk, .rst, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  nnm_addr_check #(.N_IN(3),  .N_OUT(3))  u3 (.clk, .rst, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  nnm_addr_check #(.N_IN(16), .N_OUT(16)) u4 (.clk, .rst, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));
  nnm_addr_check #(.N_IN(24), .N_OUT(8))  u5 (.clk, .rst, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]));

  function automatic bit all_finished();
    for (int i = 0; i < NCFG; i++) if (!fin[i]) return 0;
    return 1;
  endfunction

  task automatic report(int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NCFG; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      begin
        repeat (50000) @(posedge clk);
        $display("watchdog expired");
        report(1);
      end
      begin
        #1;
        while (!all_finished()) @(posedge clk);
        report(0);
      end
    join
  end
endmodule
