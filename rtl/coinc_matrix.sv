// coinc_matrix: tests every channel pair of the widest field of view for
// coincident edges and forms the coincidence matrix.
//
// Inputs are the edge words of all N_CH channels (SPC samples per clock,
// bit 0 oldest). Two edges, at samples a and b of the common 3 GHz time
// grid, are in coincidence when |a - b| <= cw_size - 1, i.e. both fall in a
// window of cw_size sampling periods (cw_size = 2, 3 or 4; 2T = 660 ps is the
// smallest window that catches every pair of hits less than T apart, since
// such hits may land on two consecutive samples). The coincidence is
// reported in the clock cycle that holds the later of the two edges, so
// edges up to CW_MAX-1 samples into the previous word are compared too.
// Values of cw_size outside 2..CW_MAX are clamped.
//
// The matrix has N_CH/2 rows and 2*NFOV_MAX+1 columns, laid out as in
// coinc_pkg: column NFOV_MAX holds the opposite-channel pairs, columns
// NFOV_MAX +- n the pairs of FOV level n. All entries are computed every
// cycle; the FOV selection is left to coinc_validation. One flag per pair
// and cycle; output registered, one clock of latency.
//
// The window rule, the parameter cw_size and the 3 x 5 matrix for six
// channels follow the published design. Which pair sits in which matrix cell, and the
// reporting in the cycle of the later edge, are this design's choices.
module coinc_matrix #(
  parameter int N_CH     = coinc_pkg::N_CH,
  parameter int SPC      = coinc_pkg::SPC,
  parameter int NFOV_MAX = coinc_pkg::NFOV_MAX,
  parameter int CW_MIN   = coinc_pkg::CW_MIN,
  parameter int CW_MAX   = coinc_pkg::CW_MAX,
  parameter int CW_W     = coinc_pkg::CW_W
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [CW_W-1:0]                     cw_size,  // window in sample periods
  input  logic [N_CH-1:0][SPC-1:0]            edges,
  output logic [N_CH/2-1:0][2*NFOV_MAX:0]     matrix
);

  localparam int ROWS = N_CH / 2;
  localparam int COLS = 2 * NFOV_MAX + 1;

  logic [N_CH-1:0][SPC-1:0]   prev_q;
  logic [N_CH-1:0][2*SPC-1:0] ext;      // {current, previous} per channel
  logic [CW_MAX-1:0]          win_en;   // win_en[j]: offsets of j samples count
  logic [ROWS-1:0][COLS-1:0]  hit;

  always_comb begin
    int cw;
    cw = int'(cw_size);
    if (cw < CW_MIN) cw = CW_MIN;
    if (cw > CW_MAX) cw = CW_MAX;
    for (int j = 0; j < CW_MAX; j++)
      win_en[j] = (j < cw);
    for (int c = 0; c < N_CH; c++)
      ext[c] = {edges[c], prev_q[c]};
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar m = 0; m < COLS; m++) begin : g_col
      localparam int A = coinc_pkg::pair_a(N_CH, NFOV_MAX, r, m);
      localparam int B = coinc_pkg::pair_b(N_CH, NFOV_MAX, r, m);
      always_comb begin
        hit[r][m] = 1'b0;
        for (int k = SPC; k < 2*SPC; k++)
          for (int j = 0; j < CW_MAX; j++)
            if (win_en[j])
              hit[r][m] = hit[r][m]
                        | (ext[A][k] & ext[B][k-j])
                        | (ext[B][k] & ext[A][k-j]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_q <= '0;
      matrix <= '0;
    end else begin
      prev_q <= edges;
      matrix <= hit;
    end
  end

endmodule
