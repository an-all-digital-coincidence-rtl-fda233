// coinc_trigger_top: all-digital coincidence trigger for a cube PET camera
// with one detector per face (N_CH time channels).
//
// Pipeline, one lane per channel, then across channels:
//   sample_ch        3 GHz equivalent sampling on 3 pads, 12 samples / 4 ns
//   delay_line       per-channel delay of 0..59 sampling periods (330 ps)
//   edge_detect      low-to-high transitions = hit time marks
//   coinc_matrix     edges of two channels within cw_size periods, all pairs
//   coinc_validation nFOV mask, optional multiple-coincidence rejection,
//                    trigger to the data acquisition channels
// hist_sweep runs the delay-sweep coincidence histogram: while it is busy,
// the delay of channel hist_ch is taken from the sweep instead of
// delay[hist_ch]; the validated trigger is what it counts.
//
// Clocks: clk is the 250 MHz processing clock. clk_ph[p] are the 500 MHz
// pad clocks, clk_ph[p] lagging clk_ph[0] by p*T (T = 1/3 ns), with the
// rising edges of clk aligned to rising edges of clk_ph[0]. rst is
// synchronous to clk and should be held for at least 8 cycles.
//
// Latency: a hit whose (delayed) sample lands in the word registered at clk
// edge n gives trig after clk edge n+4. From the hit to trig this is 18.3 to
// 22 ns plus delay*T rounded up to whole clock cycles.
//
// Configuration (delay, cw_size, nfov, m_reject, hist_*) is taken as plain
// inputs, held static in normal operation; how the host writes them is not
// part of this design.
module coinc_trigger_top #(
  parameter int N_CH      = coinc_pkg::N_CH,
  parameter int PADS      = coinc_pkg::PADS,
  parameter int PAD_BITS  = coinc_pkg::PAD_BITS,
  parameter int DELAY_MAX = coinc_pkg::DELAY_MAX,
  parameter int DELAY_W   = coinc_pkg::DELAY_W,
  parameter int NFOV_MAX  = coinc_pkg::NFOV_MAX,
  parameter int NFOV_W    = coinc_pkg::NFOV_W,
  parameter int CW_W      = coinc_pkg::CW_W,
  parameter int COUNT_W   = coinc_pkg::COUNT_W,
  parameter int DWELL_W   = coinc_pkg::DWELL_W,
  parameter int CH_W      = $clog2(N_CH)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [PADS-1:0]               clk_ph,
  input  logic [N_CH-1:0]               hit_in,       // fast hit signals of the detectors
  // coincidence parameters
  input  logic [N_CH-1:0][DELAY_W-1:0]  delay,        // per-channel delay, units of T
  input  logic [CW_W-1:0]               cw_size,      // window 2..4 T
  input  logic [NFOV_W-1:0]             nfov,         // 0..NFOV_MAX
  input  logic                          m_reject,     // reject multiple coincidences
  // delay-sweep histogram
  input  logic                          hist_start,
  input  logic [CH_W-1:0]               hist_ch,      // channel whose delay is swept
  input  logic [DWELL_W-1:0]            hist_dwell,   // cycles counted per bin
  output logic                          hist_busy,
  output logic                          hist_done,
  input  logic [DELAY_W-1:0]            hist_rd_addr,
  output logic [COUNT_W-1:0]            hist_rd_data,
  // trigger to the data acquisition channels
  output logic                          trig,
  output logic [N_CH-1:0]               trig_ch
);

  localparam int SPC = PADS * PAD_BITS;

  logic [N_CH-1:0][SPC-1:0]        sampled, delayed, edges;
  logic [N_CH-1:0][DELAY_W-1:0]    ch_delay;
  logic [DELAY_W-1:0]              sweep_delay;
  logic [N_CH/2-1:0][2*NFOV_MAX:0] matrix;

  always_comb begin
    ch_delay = delay;
    if (hist_busy) ch_delay[hist_ch] = sweep_delay;
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    sample_ch #(.PADS(PADS), .PAD_BITS(PAD_BITS)) u_sample (
      .clk(clk), .rst(rst), .clk_ph(clk_ph), .din(hit_in[c]), .word(sampled[c])
    );
    delay_line #(.SPC(SPC), .DELAY_MAX(DELAY_MAX), .DELAY_W(DELAY_W)) u_delay (
      .clk(clk), .rst(rst), .delay(ch_delay[c]), .din(sampled[c]), .dout(delayed[c])
    );
    edge_detect #(.SPC(SPC)) u_edge (
      .clk(clk), .rst(rst), .din(delayed[c]), .edges(edges[c])
    );
  end

  coinc_matrix #(
    .N_CH(N_CH), .SPC(SPC), .NFOV_MAX(NFOV_MAX), .CW_W(CW_W)
  ) u_matrix (
    .clk(clk), .rst(rst), .cw_size(cw_size), .edges(edges), .matrix(matrix)
  );

  coinc_validation #(
    .N_CH(N_CH), .NFOV_MAX(NFOV_MAX), .NFOV_W(NFOV_W)
  ) u_valid (
    .clk(clk), .rst(rst), .nfov(nfov), .m_reject(m_reject), .matrix(matrix),
    .trig(trig), .trig_ch(trig_ch)
  );

  hist_sweep #(
    .BINS(DELAY_MAX + 1), .DELAY_W(DELAY_W), .COUNT_W(COUNT_W), .DWELL_W(DWELL_W)
  ) u_hist (
    .clk(clk), .rst(rst), .start(hist_start), .dwell(hist_dwell), .trig_in(trig),
    .busy(hist_busy), .done(hist_done), .delay_out(sweep_delay),
    .rd_addr(hist_rd_addr), .rd_data(hist_rd_data)
  );

endmodule
