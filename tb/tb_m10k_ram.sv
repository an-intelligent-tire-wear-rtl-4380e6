// Self-checking test of m10k_ram: words written are read back, and the read
// data of an address presented in cycle t appears exactly in cycle t+2.
module tb_m10k_ram;
  localparam int W = 27, D = 33;
  logic clk = 0;
  logic wr_en;
  logic [5:0] wr_addr, rd_addr;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  m10k_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] addr_at [400];

  task automatic fill();
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = W'($urandom); model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
  endtask

  // One new read address per cycle; the word for the address set at the
  // falling edge of cycle n must be on rd_data at the falling edge of n+2.
  task automatic read_stream();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        checks++;
        if (rd_data !== model[addr_at[n-2]]) begin
          failures++;
          $display("FAIL read of %0d: got %h expected %h", addr_at[n-2], rd_data, model[addr_at[n-2]]);
        end
      end
      addr_at[n] = 6'($urandom % D);
      rd_addr = addr_at[n];
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    fill();
    read_stream();
    fill();             // overwrite every word and read again
    read_stream();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
