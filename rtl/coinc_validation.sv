// coinc_validation: turns the coincidence matrix into the trigger.
//
// A matrix entry is allowed when its FOV level (distance of its column from
// the centre column) is at most nfov; entries outside the selected field of
// view are discarded. When m_reject is set, a cycle with more than one
// allowed coincidence (three or more channels hit, or two separate pairs) is
// a multiple coincidence and gives no trigger. Otherwise any allowed
// coincidence gives a one-cycle pulse on trig, and trig_ch flags the
// channels of the accepted pair(s), for the data acquisition channels.
// nfov values above NFOV_MAX are treated as NFOV_MAX. Output registered,
// one clock of latency; a new decision is made every clock, so there is no
// dead time.
//
// The nFOV and m_reject parameters and their meaning follow the published design. The
// one-cycle trigger pulse, the per-channel trigger flags and counting
// multiplicity over the allowed entries are this design's choices.
module coinc_validation #(
  parameter int N_CH     = coinc_pkg::N_CH,
  parameter int NFOV_MAX = coinc_pkg::NFOV_MAX,
  parameter int NFOV_W   = coinc_pkg::NFOV_W
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [NFOV_W-1:0]               nfov,
  input  logic                            m_reject,
  input  logic [N_CH/2-1:0][2*NFOV_MAX:0] matrix,
  output logic                            trig,
  output logic [N_CH-1:0]                 trig_ch
);

  localparam int ROWS = N_CH / 2;
  localparam int COLS = 2 * NFOV_MAX + 1;

  logic [ROWS-1:0][COLS-1:0] allowed;
  logic [N_CH-1:0]           chans;
  int                        n_coinc;
  logic                      accept;

  always_comb begin
    int fov;
    fov = (int'(nfov) > NFOV_MAX) ? NFOV_MAX : int'(nfov);
    n_coinc = 0;
    chans   = '0;
    for (int r = 0; r < ROWS; r++)
      for (int m = 0; m < COLS; m++) begin
        allowed[r][m] = matrix[r][m] && (coinc_pkg::col_level(NFOV_MAX, m) <= fov);
        if (allowed[r][m]) begin
          n_coinc++;
          chans[coinc_pkg::pair_a(N_CH, NFOV_MAX, r, m)] = 1'b1;
          chans[coinc_pkg::pair_b(N_CH, NFOV_MAX, r, m)] = 1'b1;
        end
      end
    accept = (n_coinc > 0) && !(m_reject && n_coinc > 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trig    <= 1'b0;
      trig_ch <= '0;
    end else begin
      trig    <= accept;
      trig_ch <= accept ? chans : '0;
    end
  end

  // a trigger always names at least two channels, and channels only come with a trigger
  a_trig_ch: assert property (@(posedge clk) disable iff (rst) trig == ($countones(trig_ch) >= 2));

endmodule
