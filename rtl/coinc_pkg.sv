// coinc_pkg: constants and helper functions shared by the coincidence
// trigger modules.
//
// Sampling: every time channel is sampled on PADS input pads, each clocked
// by a 500 MHz double-data-rate clock, the pads offset from each other by one
// sampling period T = 1/3 ns. PADS x 2 samples per ns give the 3 GHz
// equivalent rate. A 1:PAD_BITS deserializer per pad brings the data down to
// the 250 MHz processing clock, so one processing cycle carries
// SPC = PADS*PAD_BITS = 12 samples of every channel. Within such a word bit 0
// is the oldest sample and bit SPC-1 the newest.
//
// The number of channels (six, one per face of the cube camera), the 3 pads,
// the 500 MHz DDR / 250 MHz clocks, the delay range (19.47 ns = 59 steps of
// T), the window sizes 2T..4T and nFOV up to 2 follow the published design this RTL
// is built from. The count and dwell widths are this design's own choice,
// sized for the longest dwell used there (300 s per histogram bin).
//
// Coincidence matrix layout. For N channels on a ring (channel c opposite to
// c+N/2), the FOV level n = 0..NFOV_MAX selects pairs whose ring distance is
// d = N/2 - n: n = 0 is the opposite channel only, each further level adds
// the next-closer channels on both sides. The matrix has N/2 rows and
// 2*NFOV_MAX+1 columns. Column NFOV_MAX holds level 0; columns NFOV_MAX+n
// and NFOV_MAX-n hold level n. Row r, column m pairs
//   m >= NFOV_MAX : channel r       with channel (r + d) mod N
//   m <  NFOV_MAX : channel r + N/2 with channel (r + N/2 + d) mod N
// so each unordered channel pair within the widest FOV appears exactly once
// (15 pairs for N = 6, NFOV_MAX = 2, a 3 x 5 matrix).
package coinc_pkg;

  localparam int N_CH      = 6;   // time channels (cube faces)
  localparam int PADS      = 3;   // pads per time channel
  localparam int PAD_BITS  = 4;   // deserialization factor per pad (DDR, 2 samples per fast cycle)
  localparam int SPC       = PADS * PAD_BITS;  // samples per processing cycle
  localparam int DELAY_MAX = 59;  // 59 x 330 ps = 19.47 ns delay range
  localparam int DELAY_W   = $clog2(DELAY_MAX + 1);
  localparam int NFOV_MAX  = 2;
  localparam int NFOV_W    = 2;
  localparam int CW_MIN    = 2;   // smallest coincidence window, 2T
  localparam int CW_MAX    = 4;   // largest coincidence window, 4T
  localparam int CW_W      = 3;   // cw_size holds the window length in T (2..4)
  localparam int HIST_BINS = DELAY_MAX + 1;
  localparam int COUNT_W   = 32;  // histogram bin counter
  localparam int DWELL_W   = 40;  // dwell time in 4 ns cycles (300 s = 7.5e10 cycles)

  // Ring distance of the pairs in matrix column m.
  function automatic int col_dist(int n_ch, int nfov_max, int m);
    int n;
    n = (m >= nfov_max) ? (m - nfov_max) : (nfov_max - m);
    return n_ch / 2 - n;
  endfunction

  // FOV level of matrix column m.
  function automatic int col_level(int nfov_max, int m);
    return (m >= nfov_max) ? (m - nfov_max) : (nfov_max - m);
  endfunction

  // First channel of the pair in row r, column m.
  function automatic int pair_a(int n_ch, int nfov_max, int r, int m);
    return (m >= nfov_max) ? r : r + n_ch / 2;
  endfunction

  // Second channel of the pair in row r, column m.
  function automatic int pair_b(int n_ch, int nfov_max, int r, int m);
    return (pair_a(n_ch, nfov_max, r, m) + col_dist(n_ch, nfov_max, m)) % n_ch;
  endfunction

endpackage
