// tb_coinc_matrix: random sparse edge words on six channels, window sizes
// 2T, 3T and 4T (and out-of-range values, clamped to 2..4). The testbench
// keeps every edge at its absolute sample number and flags a pair in the
// clock cycle of its later edge whenever two edges are at most cw-1 samples
// apart. The expected 3 x 5 matrix layout is written out below as a table
// and checked to hold each of the 15 channel pairs once, with the column
// giving the FOV level (0 = opposite faces, 2 = adjacent ring neighbours).
module tb_coinc_matrix;
  localparam int N = 6, SPC = 12, K = 2, ROWS = 3, COLS = 5;
  // Expected layout: {channel a, channel b} per row and column (0-based).
  localparam int TAB_A[ROWS][COLS] = '{'{3, 3, 0, 0, 0}, '{4, 4, 1, 1, 1}, '{5, 5, 2, 2, 2}};
  localparam int TAB_B[ROWS][COLS] = '{'{4, 5, 3, 2, 1}, '{5, 0, 4, 3, 2}, '{0, 1, 5, 4, 3}};

  logic clk = 0, rst = 1;
  logic [2:0] cw_size = 3'd2;
  logic [N-1:0][SPC-1:0] edges = '0;
  logic [ROWS-1:0][COLS-1:0] matrix;
  int checks = 0, failures = 0;
  int hits_seen = 0, cross_word = 0;
  bit [N-1:0][SPC-1:0] prev_e;

  coinc_matrix dut (.*);

  always #5 clk = ~clk;

  function automatic int ring_level(int a, int b);
    int d = (a > b) ? a - b : b - a;
    if (N - d < d) d = N - d;
    return N / 2 - d;
  endfunction

  initial begin
    bit seen[N][N];
    logic [ROWS-1:0][COLS-1:0] exp_m;
    int cw;
    // Layout self-check.
    for (int r = 0; r < ROWS; r++)
      for (int m = 0; m < COLS; m++) begin
        automatic int lv = (m > K) ? m - K : K - m;
        checks++;
        if (seen[TAB_A[r][m]][TAB_B[r][m]] || ring_level(TAB_A[r][m], TAB_B[r][m]) != lv) failures++;
        seen[TAB_A[r][m]][TAB_B[r][m]] = 1; seen[TAB_B[r][m]][TAB_A[r][m]] = 1;
      end
    repeat (3) @(negedge clk);
    rst = 0;
    prev_e = '0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      if (cyc % 500 == 0) cw_size = 3'($urandom_range(0, 7));
      for (int c = 0; c < N; c++) begin
        edges[c] = '0;
        if ($urandom_range(0, 3) == 0) edges[c][$urandom_range(0, SPC-1)] = 1'b1;
        if ($urandom_range(0, 15) == 0) edges[c][$urandom_range(0, SPC-1)] = 1'b1;
      end
      cw = int'(cw_size) < 2 ? 2 : (int'(cw_size) > 4 ? 4 : int'(cw_size));
      for (int r = 0; r < ROWS; r++)
        for (int m = 0; m < COLS; m++) begin
          automatic int a = TAB_A[r][m], b = TAB_B[r][m];
          exp_m[r][m] = 1'b0;
          for (int ia = 0; ia < 2*SPC; ia++)
            for (int ib = 0; ib < 2*SPC; ib++) begin
              automatic bit ea = (ia >= SPC) ? edges[a][ia-SPC] : prev_e[a][ia];
              automatic bit eb = (ib >= SPC) ? edges[b][ib-SPC] : prev_e[b][ib];
              automatic int dd = (ia > ib) ? ia - ib : ib - ia;
              if (ea && eb && (ia >= SPC || ib >= SPC) && dd <= cw - 1) begin
                exp_m[r][m] = 1'b1;
                if (ia < SPC || ib < SPC) cross_word++;
              end
            end
        end
      @(negedge clk);
      prev_e = edges;
      checks++;
      if (exp_m != 0) hits_seen++;
      if (matrix !== exp_m) begin
        failures++;
        if (failures < 10) $display("cyc %0d cw %0d: got %b exp %b", cyc, cw, matrix, exp_m);
      end
    end
    if (hits_seen < 100 || cross_word < 10) begin
      failures++;
      $display("too few coincidences exercised: %0d %0d", hits_seen, cross_word);
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
