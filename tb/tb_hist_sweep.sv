// tb_hist_sweep: runs two delay sweeps at the default 60 bins. The trigger
// input is random, with a higher rate in a few "peak" bins (chosen from the
// delay the module drives). The testbench computes on its own when each bin
// counts (SETTLE = 8 cycles after the bin starts, for `dwell` cycles, then
// one write cycle), counts the triggers in those cycles, and compares the
// bin memory with that. It also checks delay_out during every bin, the
// cycle on which done arrives (60 * (8 + dwell + 1) cycles after start),
// that busy covers the sweep, and counter saturation with a 3-bit counter.
module tb_hist_sweep;
  localparam int BINS = 60, DW = 6, CW = 32, DWELL_W = 40, SETTLE = 8;
  logic clk = 0, rst = 1, start = 0, trig_in = 0;
  logic [DWELL_W-1:0] dwell = '0;
  logic busy, done, busy_s, done_s;
  logic [DW-1:0] delay_out, delay_s, rd_addr = '0;
  logic [CW-1:0] rd_data;
  logic [2:0] rd_data_s;
  int checks = 0, failures = 0;
  longint cyc = 0;

  hist_sweep dut (
    .clk, .rst, .start, .dwell, .trig_in, .busy, .done, .delay_out, .rd_addr, .rd_data);
  // Small counter instance: bins must saturate at 7.
  hist_sweep #(.BINS(BINS), .DELAY_W(DW), .COUNT_W(3), .DWELL_W(DWELL_W), .SETTLE(SETTLE)) dut_s (
    .clk, .rst, .start, .dwell, .trig_in, .busy(busy_s), .done(done_s), .delay_out(delay_s),
    .rd_addr, .rd_data(rd_data_s));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_sweep(int d);
    longint e0, period, rel;
    int exp_cnt[BINS];
    bit done_seen;
    foreach (exp_cnt[b]) exp_cnt[b] = 0;
    dwell = DWELL_W'(d);
    period = SETTLE + d + 1;
    start = 1;
    @(posedge clk); e0 = cyc + 1;   // edge number on which start is taken
    @(negedge clk); start = 0;
    done_seen = 0;
    // Each loop iteration: drive trig_in for the next edge, then check.
    while (!done_seen) begin
      longint nxt = cyc + 1;
      int b;
      rel = nxt - e0;
      b = int'((rel - 1) / period);
      if (b >= BINS) b = BINS - 1;
      trig_in = ($urandom_range(0, 99) < ((b >= 20 && b <= 22) ? 80 : 10));
      if (rel >= 1 && (rel - 1) % period >= SETTLE && (rel - 1) % period < SETTLE + d && (rel - 1) / period < BINS)
        if (trig_in) exp_cnt[b]++;
      @(negedge clk);
      // after edge nxt
      if (done) begin
        done_seen = 1;
        checks++;
        if (nxt - e0 != BINS * period) begin
          failures++;
          $display("done after %0d cycles, expected %0d", nxt - e0, BINS * period);
        end
      end else begin
        checks++;
        if (!busy || longint'(delay_out) != rel / period) begin
          failures++;
          if (failures < 10) $display("edge %0d: busy %0d delay %0d", rel, busy, delay_out);
        end
      end
      if (nxt - e0 > BINS * period + 5) begin failures++; done_seen = 1; end
    end
    trig_in = 0;
    @(negedge clk);
    checks++;
    if (busy) failures++;
    for (int b = 0; b < BINS; b++) begin
      rd_addr = DW'(b);
      @(negedge clk);
      checks++;
      if (rd_data != CW'(exp_cnt[b])) begin
        failures++;
        $display("bin %0d: got %0d exp %0d", b, rd_data, exp_cnt[b]);
      end
      checks++;
      if (int'(rd_data_s) != ((exp_cnt[b] > 7) ? 7 : exp_cnt[b])) begin
        failures++;
        $display("small bin %0d: got %0d exp %0d", b, rd_data_s, exp_cnt[b]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    run_sweep(40);
    run_sweep(3);
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
