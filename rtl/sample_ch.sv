// sample_ch: 3 GHz equivalent sampling of one time channel.
//
// The hit signal of a channel (a comparator output) is wired to PADS input
// pads. Pad p is clocked by clk_ph[p], a 500 MHz clock that lags clk_ph[0]
// by p sampling periods (T = 1/3 ns, i.e. 0, 333 and 667 ps for 3 pads).
// Each pad samples on both clock edges (DDR), so the pads together take one
// sample every T. Per pad a 1:PAD_BITS deserializer collects the samples:
// on every rising edge of its clock the two samples of the previous fast
// cycle (rising-edge sample, then falling-edge sample) are shifted in. On
// every rising edge of clk (250 MHz, rising edges aligned with rising edges
// of clk_ph[0]) the PADS shift registers are interleaved into one word in
// time order, word[PADS*j + p] = j-th sample of pad p, and registered.
//
// Timing: the word registered at a clk edge at time t0 holds the samples
// taken at t0 - 6 ns + k*T, k = 0..11 (for PADS = 3, PAD_BITS = 4); it is
// available one clk cycle after that edge.
//
// The published design does this with the dedicated input deserializers of the FPGA;
// this module describes the same function in portable logic. The sample
// ordering, the fast-clock phases and the word alignment are this design's
// choices. The pad flip-flops and shift registers need no reset (they are
// flushed within one word); the output word is reset to zero.
module sample_ch #(
  parameter int PADS     = coinc_pkg::PADS,
  parameter int PAD_BITS = coinc_pkg::PAD_BITS
) (
  input  logic                     clk,     // 250 MHz processing clock
  input  logic                     rst,     // synchronous, active high
  input  logic [PADS-1:0]          clk_ph,  // 500 MHz pad clocks, pad p delayed by p*T
  input  logic                     din,     // hit signal of the channel
  output logic [PADS*PAD_BITS-1:0] word     // samples, bit 0 oldest
);

  logic [PADS*PAD_BITS-1:0] interleaved;

  for (genvar p = 0; p < PADS; p++) begin : g_pad
    logic                rise_q, fall_q;
    logic [PAD_BITS-1:0] sh;

    always_ff @(posedge clk_ph[p]) rise_q <= din;
    always_ff @(negedge clk_ph[p]) fall_q <= din;

    // Newest pair at the top: rise_q was taken one fast cycle ago, fall_q
    // half a cycle ago.
    always_ff @(posedge clk_ph[p])
      sh <= {fall_q, rise_q, sh[PAD_BITS-1:2]};

    for (genvar j = 0; j < PAD_BITS; j++) begin : g_bit
      assign interleaved[PADS*j + p] = sh[j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) word <= '0;
    else     word <= interleaved;
  end

endmodule
