// tb_sample_ch: checks the 3-pad DDR sampling and 1:4 deserialization.
// The hit line is toggled at random picosecond times; for every 250 MHz word
// the testbench recomputes, from its own record of the line, the level at
// each of the 12 sampling instants t0 - 6 ns + k*T (T = 1/3 ns, pads at
// 0/333/667 ps) and compares it with the word. Clocks: 500 MHz pad clocks
// with 0, 333 and 667 ps lag, 250 MHz word clock aligned to pad clock 0.
`timescale 1ps/1ps
module tb_sample_ch;
  localparam int PADS = 3, PAD_BITS = 4, SPC = 12;
  localparam int PH[3] = '{0, 333, 667};

  logic clk = 0, rst = 1, din = 0;
  logic [PADS-1:0] clk_ph = '0;
  logic [SPC-1:0]  word;
  int checks = 0, failures = 0;
  longint tr_t[$];   // times at which din toggles (din starts at 0)

  sample_ch dut (.*);

  initial forever begin #1000 clk = 1; #2000 clk = 0; #1000; end
  for (genvar p = 0; p < PADS; p++) begin : g_clk
    initial begin #(PH[p]); forever begin #1000 clk_ph[p] = 1; #1000 clk_ph[p] = 0; end end
  end

  function automatic bit level_at(longint t);
    int n = 0;
    foreach (tr_t[i]) if (tr_t[i] <= t) n++;
    return n[0];
  endfunction

  // Stimulus: random toggles, never exactly on a sampling instant.
  initial begin
    longint t;
    repeat (8) @(posedge clk);
    rst = 0;
    repeat (400) begin
      #($urandom_range(150, 2500));
      t = $time;
      if ((t % 1000) == 0 || (t % 1000) == 333 || (t % 1000) == 667) begin #1; t = $time; end
      din = ~din;
      tr_t.push_back(t);
    end
  end

  // Check each word half a word-clock after it was registered.
  initial begin
    longint t0;
    logic [SPC-1:0] exp_w;
    @(negedge rst);
    repeat (3) @(posedge clk);
    repeat (180) begin
      @(posedge clk);
      t0 = $time;
      @(negedge clk);
      for (int k = 0; k < SPC; k++)
        exp_w[k] = level_at(t0 - 6000 + 1000 * (k / PADS) + PH[k % PADS]);
      checks++;
      if (word !== exp_w) begin
        failures++;
        $display("word at %0t: got %b exp %b", t0, word, exp_w);
      end
    end
    // Reset clears the word.
    rst = 1;
    @(posedge clk); @(negedge clk);
    checks++;
    if (word !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
