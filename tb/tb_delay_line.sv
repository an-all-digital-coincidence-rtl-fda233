// tb_delay_line: drives random 12-sample words and random delays (including
// values above the 59-sample maximum, which must act as 59) and compares the
// output with the input stream shifted by the delay, from the testbench's
// own record of every sample. Output is expected one clock after input.
module tb_delay_line;
  localparam int SPC = 12, DMAX = 59, DW = 6;
  logic clk = 0, rst = 1;
  logic [DW-1:0]  delay = '0;
  logic [SPC-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  bit stream[$];   // every sample since reset, oldest first
  int n_words = 0;

  delay_line dut (.*);

  always #5 clk = ~clk;

  initial begin
    int d;
    logic [SPC-1:0] exp_w;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      if (cyc % 23 == 0) delay = DW'($urandom_range(0, 63));
      if (cyc < 64) delay = DW'(cyc);     // every value once, early
      din = SPC'($urandom);
      @(posedge clk);
      for (int k = 0; k < SPC; k++) stream.push_back(din[k]);
      n_words++;
      @(negedge clk);
      d = (int'(delay) > DMAX) ? DMAX : int'(delay);
      for (int k = 0; k < SPC; k++) begin
        automatic int idx = (n_words - 1) * SPC + k - d;
        exp_w[k] = (idx < 0) ? 1'b0 : stream[idx];
      end
      checks++;
      if (dout !== exp_w) begin
        failures++;
        if (failures < 10) $display("cyc %0d delay %0d: got %h exp %h", cyc, delay, dout, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
