// delay_line: programmable delay of one channel's sample stream.
//
// The stream arrives as SPC samples per clock (bit 0 oldest). The module
// keeps the last DEPTH = ceil(DELAY_MAX/SPC) words in a shift register and
// picks, from the concatenation {din, history}, the SPC-bit window that
// lies `delay` samples back in time. The output is therefore the input
// stream delayed by delay*T (T = one sample period, 330 ps) plus one clock
// cycle of pipeline. delay values above DELAY_MAX are treated as DELAY_MAX.
//
// The published design gives the delay unit (the sampling period) and the range
// (19.47 ns, 59 steps), and says the delays are programmable shift
// registers; the word-wide tap selection is this design's choice.
// Reset clears the history, so the first outputs after reset are zeros.
module delay_line #(
  parameter int SPC       = coinc_pkg::SPC,
  parameter int DELAY_MAX = coinc_pkg::DELAY_MAX,
  parameter int DELAY_W   = coinc_pkg::DELAY_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [DELAY_W-1:0] delay,   // in sample periods
  input  logic [SPC-1:0]     din,
  output logic [SPC-1:0]     dout
);

  localparam int DEPTH = (DELAY_MAX + SPC - 1) / SPC;

  logic [DEPTH-1:0][SPC-1:0]   hist;     // hist[0] newest previous word
  logic [(DEPTH+1)*SPC-1:0]    window;   // bit 0 oldest sample
  logic [DELAY_W-1:0]          dly;

  always_comb begin
    window[DEPTH*SPC +: SPC] = din;
    for (int i = 0; i < DEPTH; i++)
      window[(DEPTH-1-i)*SPC +: SPC] = hist[i];
    dly = (int'(delay) > DELAY_MAX) ? DELAY_W'(DELAY_MAX) : delay;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '0;
      dout <= '0;
    end else begin
      hist[0] <= din;
      for (int i = 1; i < DEPTH; i++)
        hist[i] <= hist[i-1];
      dout <= window[DEPTH*SPC - int'(dly) +: SPC];
    end
  end

endmodule
