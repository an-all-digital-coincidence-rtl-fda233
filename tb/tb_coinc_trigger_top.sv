// tb_coinc_trigger_top: end-to-end test of the coincidence trigger at its
// default size (six channels, 59-step delays, 60-bin histogram).
//
// Hits are rectangular pulses on the six detector lines at picosecond
// times. A reference model, written independently of the RTL, converts each
// rising edge into its sample number on the 3 GHz grid (pads at 0, 333 and
// 667 ps, DDR at 500 MHz), adds the channel delay, pairs edges of two
// channels at most cw-1 samples apart, keeps the pairs whose FOV level
// (3 minus the ring distance of the two faces) is within nFOV, applies the
// multiple-coincidence rule, and predicts trig / trig_ch for every 4 ns
// cycle. Phases:
//   A  random pairs and singles, cw = 2, nFOV = 2      (window hit / miss)
//   B  same with cw = 3 and cw = 4
//   C  nFOV = 0 and 1: pairs outside the FOV are rejected
//   D  triple hits, m_reject on (rejected) and off (accepted)
//   E  11.22 ns cable offset on channel 4, compensated by a delay of 34
//      steps on channel 1; latency is checked against 35 ns (no delay) and
//      50 ns (with the delay), the figures measured on the original system
//   F  two delay-sweep histograms, channel 4 lagging channel 1 by 3.5 ns:
//      a 19.91 MHz rectangular wave split onto both channels, and true
//      pairs at random times mixed with uncorrelated singles (nFOV = 0).
//      Every bin is compared with the model, the peak must sit at the
//      offset, and only the second histogram may show a random floor
// Each mechanism is counted; one that never happens is a failure.
`timescale 1ps/1ps
module tb_coinc_trigger_top;
  localparam int N = 6, SPC = 12, DW = 6, BINS = 60, SETTLE = 8;
  localparam longint PH[3] = '{0, 333, 667};
  localparam int PIPE = 4;   // word edge -> trig register edge

  logic clk = 0, rst = 1;
  logic [2:0] clk_ph = '0;
  logic [N-1:0] hit_in = '0;
  logic [N-1:0][DW-1:0] delay = '0;
  logic [2:0] cw_size = 3'd2;
  logic [1:0] nfov = 2'd2;
  logic m_reject = 0;
  logic hist_start = 0;
  logic [2:0] hist_ch = '0;
  logic [39:0] hist_dwell = '0;
  logic hist_busy, hist_done;
  logic [DW-1:0] hist_rd_addr = '0;
  logic [31:0] hist_rd_data;
  logic trig;
  logic [N-1:0] trig_ch;

  coinc_trigger_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_acc = 0, n_win_miss = 0, n_cw[5], n_fov_rej = 0, n_mult_rej = 0, n_mult_acc = 0;
  int n_delay_comp = 0, n_cross_word = 0, n_hist_peak = 0;

  // clocks: clk rises at 1000 + 4000 n, pad clock p rises at 1000 + PH[p] + 2000 n
  initial forever begin #1000 clk = 1; #2000 clk = 0; #1000; end
  for (genvar p = 0; p < 3; p++) begin : g_clk
    initial begin #(PH[p]); forever begin #1000 clk_ph[p] = 1; #1000 clk_ph[p] = 0; end end
  end

  // ---------------------------------------------------------------- stimulus
  longint pulse_t[N][$];     // rising-edge times of the current phase
  longint pulse_w[N][$];     // widths
  bit [N-1:0] obs[longint];  // observed trig_ch, by cycle (edge number)

  function automatic longint off_grid(longint t);
    longint r = t % 1000;
    return (r == 0 || r == 333 || r == 667) ? t + 1 : t;
  endfunction

  task automatic add_pulse(int c, longint t, longint w);
    pulse_t[c].push_back(off_grid(t));
    pulse_w[c].push_back(w);
  endtask

  task automatic drive_channel(int c);
    for (int i = 0; i < pulse_t[c].size(); i++) begin
      if (pulse_t[c][i] > $time) #(pulse_t[c][i] - $time);
      hit_in[c] = 1'b1;
      #(pulse_w[c][i]);
      hit_in[c] = 1'b0;
    end
  endtask

  task automatic play();
    fork
      drive_channel(0); drive_channel(1); drive_channel(2);
      drive_channel(3); drive_channel(4); drive_channel(5);
    join
  endtask

  // record the trigger after every clk edge (sampled mid-cycle)
  initial forever begin
    @(negedge clk);
    if (!rst && trig) obs[($time - 3000) / 4000] = trig_ch;
  end

  // ---------------------------------------------------------------- model
  // sample number of the first grid sample after time t
  function automatic longint sample_no(longint t);
    longint q = t / 1000, r = t % 1000;
    if (r < 333) return 3 * q + 1;
    if (r < 667) return 3 * q + 2;
    return 3 * (q + 1);
  endfunction

  // position in the word stream: word n (registered at edge n) holds 12n..12n+11
  function automatic longint stream_pos(longint t);
    return sample_no(t) + 15;
  endfunction

  function automatic int level_of(int a, int b);
    int d = (a > b) ? a - b : b - a;
    if (N - d < d) d = N - d;
    return N / 2 - d;
  endfunction

  // Predicted triggers, by edge number, for the current pulse lists.
  function automatic void predict(input int dly[N], input int cw, input int fv, input bit mr,
                                  ref bit [N-1:0] pred[longint], input bit count_it);
    longint pos[N][$];
    bit [N-1:0][N-1:0] flag[longint];   // per cycle, pair a<b
    bit [N-1:0][N-1:0] allpairs[longint];
    pred.delete();
    for (int c = 0; c < N; c++)
      foreach (pulse_t[c][i]) pos[c].push_back(stream_pos(pulse_t[c][i]) + dly[c]);
    for (int c = 0; c < N; c++) pos[c].sort();
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        begin
          int j0 = 0;
          // both lists are sorted: scan only partners within 6 samples
          foreach (pos[a][i]) begin
            while (j0 < pos[b].size() && pos[b][j0] < pos[a][i] - 6) j0++;
            for (int j = j0; j < pos[b].size() && pos[b][j] <= pos[a][i] + 6; j++) begin
              longint dd = pos[a][i] - pos[b][j];
              longint later = (pos[a][i] > pos[b][j]) ? pos[a][i] : pos[b][j];
              longint cyc = later / SPC;
              if (dd < 0) dd = -dd;
              if (dd <= cw - 1) begin
                if (!flag.exists(cyc)) begin flag[cyc] = '0; allpairs[cyc] = '0; end
                allpairs[cyc][a][b] = 1'b1;
                if (level_of(a, b) <= fv) flag[cyc][a][b] = 1'b1;
                if (count_it) begin
                  n_cw[cw]++;
                  if (later % SPC < dd) n_cross_word++;
                end
              end else if (count_it) n_win_miss++;
            end
          end
        end
    foreach (allpairs[cyc]) begin
      int cnt = 0;
      bit [N-1:0] ch = '0;
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          if (flag[cyc][a][b]) begin cnt++; ch[a] = 1'b1; ch[b] = 1'b1; end
      if (count_it && cnt == 0) n_fov_rej++;
      if (count_it && cnt > 1 && mr) n_mult_rej++;
      if (count_it && cnt > 1 && !mr) n_mult_acc++;
      if (cnt > 0 && !(mr && cnt > 1)) begin
        pred[cyc + PIPE] = ch;
        if (count_it) n_acc++;
      end
    end
  endfunction

  // Compare observed and predicted triggers for edge numbers lo..hi.
  task automatic compare(input bit [N-1:0] pred[longint], input longint lo, input longint hi,
                         input string tag);
    foreach (pred[e]) begin
      checks++;
      if (!obs.exists(e) || obs[e] !== pred[e]) begin
        failures++;
        $display("%s: missing/wrong trigger at cycle %0d exp %b got %b", tag, e, pred[e],
                 obs.exists(e) ? obs[e] : 6'b0);
      end
    end
    foreach (obs[e])
      if (e >= lo && e <= hi && !pred.exists(e)) begin
        checks++;
        failures++;
        $display("%s: unexpected trigger at cycle %0d (%b)", tag, e, obs[e]);
      end
  endtask

  // ---------------------------------------------------------------- phases
  task automatic clear_pulses();
    for (int c = 0; c < N; c++) begin pulse_t[c].delete(); pulse_w[c].delete(); end
  endtask

  // Random events starting at t0: pairs (any two channels, offset up to
  // +-1.7 ns), triples, singles. Events are 40 ns apart.
  task automatic make_events(longint t0, int n_ev, int triple_pct);
    longint t = t0;
    for (int e = 0; e < n_ev; e++) begin
      int a = $urandom_range(0, N - 1);
      int b = (a + $urandom_range(1, N - 1)) % N;
      int k = $urandom_range(0, 99);
      t += 40000 + $urandom_range(0, 999);
      add_pulse(a, t, 3000);
      if (k < 80) add_pulse(b, t + $urandom_range(0, 3400) - 1700, 3000);
      if (k < triple_pct) begin
        int c = (b + $urandom_range(1, N - 1)) % N;
        if (c != a) add_pulse(c, t + $urandom_range(0, 600) - 300, 3000);
      end
    end
  endtask

  task automatic run_phase(string tag, int cw, int fv, bit mr, int dly[N], int n_ev, int triple_pct);
    bit [N-1:0] pred[longint];
    longint lo, hi;
    cw_size = 3'(cw); nfov = 2'(fv); m_reject = mr;
    for (int c = 0; c < N; c++) delay[c] = DW'(dly[c]);
    clear_pulses();
    lo = ($time - 3000) / 4000 + 1;
    make_events($time + 30000, n_ev, triple_pct);
    predict(dly, cw, fv, mr, pred, 1'b1);
    play();
    #100000;
    hi = ($time - 3000) / 4000;
    compare(pred, lo, hi, tag);
  endtask

  initial begin
    static int d0[N] = '{default: 0};
    static int d_e[N] = '{34, 0, 0, 0, 0, 0};
    repeat (10) @(posedge clk);
    #500 rst = 0;
    #20000;

    // A, B: window sizes
    run_phase("A cw2", 2, 2, 0, d0, 300, 0);
    run_phase("B cw3", 3, 2, 0, d0, 200, 0);
    run_phase("B cw4", 4, 2, 0, d0, 200, 0);
    // C: field of view
    run_phase("C fov0", 2, 0, 0, d0, 200, 0);
    run_phase("C fov1", 2, 1, 0, d0, 200, 0);
    // D: multiple coincidences
    run_phase("D mrej", 2, 2, 1, d0, 200, 50);
    run_phase("D macc", 2, 2, 0, d0, 200, 50);

    // E: cable offset of 11.22 ns on channel 4, delay 34 on channel 1
    begin
      bit [N-1:0] pred[longint];
      longint lo, hi, t_in, lat_ps;
      longint max_lat0, max_lat34;
      max_lat0 = 0; max_lat34 = 0;
      for (int pass = 0; pass < 2; pass++) begin
        int dd[N];
        dd = (pass == 0) ? d0 : d_e;
        for (int c = 0; c < N; c++) delay[c] = DW'(dd[c]);
        cw_size = 3'd2; nfov = 2'd2; m_reject = 1'b0;
        clear_pulses();
        lo = ($time - 3000) / 4000 + 1;
        t_in = $time + 30000;
        for (int e = 0; e < 100; e++) begin
          t_in += 50000 + $urandom_range(0, 999);
          add_pulse(0, t_in, 20000);
          add_pulse(3, t_in + (pass == 0 ? 0 : 11220), 20000);
        end
        predict(dd, 2, 2, 0, pred, 1'b0);
        play();
        #100000;
        hi = ($time - 3000) / 4000;
        compare(pred, lo, hi, pass == 0 ? "E nodelay" : "E delay34");
        checks++;
        if (pred.size() != 100) begin
          failures++;
          $display("E: %0d of 100 offset pairs found", pred.size());
        end else if (pass == 1) n_delay_comp += pred.size();
        // latency: last input edge of the pair to the trigger output
        foreach (pulse_t[0][i]) begin
          automatic longint last = (pulse_t[3][i] > pulse_t[0][i]) ? pulse_t[3][i] : pulse_t[0][i];
          automatic longint earliest = -1;
          foreach (obs[e]) if (earliest < 0 && 1000 + 4000 * e > last) earliest = e;
          lat_ps = 1000 + 4000 * earliest - pulse_t[0][i];
          if (pass == 0 && lat_ps > max_lat0) max_lat0 = lat_ps;
          if (pass == 1 && lat_ps > max_lat34) max_lat34 = lat_ps;
        end
      end
      $display("latency from channel-1 hit to trigger: %0d ps (no delay), %0d ps (delay 34)",
               max_lat0, max_lat34);
      checks++;
      if (max_lat0 > 35000 || max_lat34 > 50000 || max_lat34 <= max_lat0) failures++;
    end

    // F: delay-sweep histograms, channel 1 swept, channel 4 lags by 3.5 ns.
    //   kind 0: 19.91 MHz rectangular wave on both channels (bench test)
    //   kind 1: true pairs at random times plus uncorrelated singles on the
    //           two channels, nFOV = 0 (camera-like: peak over a floor)
    for (int kind = 0; kind < 2; kind++) begin
      int dwell, period, peak, floor_bins, fv, exp_cnt[BINS];
      longint e0, t_in, t_end;
      int dd[N];
      dwell = (kind == 0) ? 150 : 300;
      fv = (kind == 0) ? 2 : 0;
      dd = d0;
      delay = '0; cw_size = 3'd2; nfov = 2'(fv); m_reject = 1'b0;
      hist_ch = 3'd0;
      hist_dwell = 40'(dwell);
      period = SETTLE + dwell + 1;
      clear_pulses();
      t_in = $time + 20000;
      t_end = t_in + longint'(BINS * period) * 4000 + 40000;
      while (t_in < t_end) begin
        if (kind == 0) begin
          add_pulse(0, t_in, 25000);
          add_pulse(3, t_in + 3500, 25000);
          t_in += 50226;   // 19.91 MHz
        end else begin
          int k = $urandom_range(0, 99);
          if (k < 50) begin add_pulse(0, t_in, 3000); add_pulse(3, t_in + 3500, 3000); end
          else if (k < 75) add_pulse(0, t_in, 3000);
          else add_pulse(3, t_in, 3000);
          t_in += $urandom_range(8000, 40000);
        end
      end
      @(negedge clk);
      hist_start = 1;
      e0 = ($time - 3000) / 4000 + 1;
      @(negedge clk);
      hist_start = 0;
      fork
        play();
        begin
          @(posedge hist_done);
          checks++;
          if (($time - 1000) / 4000 != e0 + BINS * period) begin
            failures++;
            $display("F: sweep took %0d cycles", ($time - 1000) / 4000 - e0);
          end
        end
      join
      #20000;
      // expected count per bin: triggers produced with channel-1 delay b whose
      // register edge + 1 lies in the bin's counting window
      foreach (exp_cnt[b]) begin
        bit [N-1:0] pred[longint];
        automatic longint w_lo = e0 + b * period + SETTLE + 1, w_hi = e0 + b * period + SETTLE + dwell;
        dd[0] = b;
        predict(dd, 2, fv, 0, pred, 1'b0);
        exp_cnt[b] = 0;
        foreach (pred[e]) if (e + 1 >= w_lo && e + 1 <= w_hi) exp_cnt[b]++;
      end
      peak = 0;
      floor_bins = 0;
      for (int b = 0; b < BINS; b++) begin
        hist_rd_addr = DW'(b);
        @(negedge clk); @(negedge clk);
        checks++;
        if (hist_rd_data != 32'(exp_cnt[b])) begin
          failures++;
          $display("F: bin %0d got %0d exp %0d", b, hist_rd_data, exp_cnt[b]);
        end
        if (exp_cnt[b] > exp_cnt[peak]) peak = b;
        if (exp_cnt[b] > 0 && (b < 9 || b > 12)) floor_bins++;
      end
      // the peak must be at the 3.5 ns offset (10.5 T); the bench signal has
      // no random floor, the camera-like one must show one
      checks++;
      if (peak != 10 && peak != 11) begin
        failures++;
        $display("F: histogram peak at bin %0d", peak);
      end else n_hist_peak++;
      checks++;
      if ((kind == 0) != (floor_bins == 0)) begin
        failures++;
        $display("F: %0d bins outside the peak hold counts", floor_bins);
      end
      $display("histogram %0d: bins 9..12 = %0d %0d %0d %0d, bin 0 = %0d, bin 30 = %0d, %0d floor bins",
               kind, exp_cnt[9], exp_cnt[10], exp_cnt[11], exp_cnt[12], exp_cnt[0], exp_cnt[30], floor_bins);
    end

    $display("accepted %0d, window misses %0d, cw2/3/4 pairs %0d/%0d/%0d, across words %0d",
             n_acc, n_win_miss, n_cw[2], n_cw[3], n_cw[4], n_cross_word);
    $display("outside FOV %0d, multiple rejected %0d, multiple accepted %0d, delay-compensated %0d, histogram peak %0d",
             n_fov_rej, n_mult_rej, n_mult_acc, n_delay_comp, n_hist_peak);
    if (n_acc == 0 || n_win_miss == 0 || n_cw[2] == 0 || n_cw[3] == 0 || n_cw[4] == 0 ||
        n_cross_word == 0 || n_fov_rej == 0 || n_mult_rej == 0 || n_mult_acc == 0 ||
        n_delay_comp == 0 || n_hist_peak == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
