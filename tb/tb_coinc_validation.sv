// tb_coinc_validation: random coincidence matrices under every nFOV
// (including out-of-range 3, treated as 2) and both m_reject settings. An
// entry counts when its FOV level |m - 2| is at most nFOV; with m_reject a
// cycle with more than one counted entry gives no trigger. trig_ch must flag
// the channels of the counted pairs (layout table as in tb_coinc_matrix).
// One clock latency.
module tb_coinc_validation;
  localparam int N = 6, K = 2, ROWS = 3, COLS = 5;
  localparam int TAB_A[ROWS][COLS] = '{'{3, 3, 0, 0, 0}, '{4, 4, 1, 1, 1}, '{5, 5, 2, 2, 2}};
  localparam int TAB_B[ROWS][COLS] = '{'{4, 5, 3, 2, 1}, '{5, 0, 4, 3, 2}, '{0, 1, 5, 4, 3}};

  logic clk = 0, rst = 1;
  logic [1:0] nfov = '0;
  logic m_reject = 0;
  logic [ROWS-1:0][COLS-1:0] matrix = '0;
  logic trig;
  logic [N-1:0] trig_ch;
  int checks = 0, failures = 0;
  int n_fov_rej = 0, n_mult_rej = 0, n_acc = 0;

  coinc_validation dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic exp_t;
    logic [N-1:0] exp_ch;
    int cnt, fov, all;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      if (cyc % 50 == 0) begin nfov = 2'($urandom_range(0, 3)); m_reject = 1'($urandom); end
      matrix = '0;
      repeat ($urandom_range(0, 3)) matrix[$urandom_range(0, ROWS-1)][$urandom_range(0, COLS-1)] = 1'b1;
      fov = (nfov > 2) ? 2 : int'(nfov);
      cnt = 0; all = 0; exp_ch = '0;
      for (int r = 0; r < ROWS; r++)
        for (int m = 0; m < COLS; m++)
          if (matrix[r][m]) begin
            all++;
            if (((m > K) ? m - K : K - m) <= fov) begin
              cnt++;
              exp_ch[TAB_A[r][m]] = 1'b1;
              exp_ch[TAB_B[r][m]] = 1'b1;
            end
          end
      exp_t = (cnt > 0) && !(m_reject && cnt > 1);
      if (!exp_t) exp_ch = '0;
      if (all > 0 && cnt == 0) n_fov_rej++;
      if (m_reject && cnt > 1) n_mult_rej++;
      if (exp_t) n_acc++;
      @(negedge clk);
      checks++;
      if (trig !== exp_t || trig_ch !== exp_ch) begin
        failures++;
        if (failures < 10) $display("cyc %0d: m %b nfov %0d mr %0d got %b/%b exp %b/%b",
                                    cyc, matrix, nfov, m_reject, trig, trig_ch, exp_t, exp_ch);
      end
    end
    if (n_fov_rej == 0 || n_mult_rej == 0 || n_acc == 0) failures++;
    $display("accepted %0d, outside FOV %0d, multiple rejected %0d", n_acc, n_fov_rej, n_mult_rej);
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
