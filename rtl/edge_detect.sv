// edge_detect: marks low-to-high transitions of one channel's sample stream.
//
// A sample is an edge when it is 1 and the sample one period T earlier is 0.
// The last sample of the previous word is kept so that an edge on a word
// boundary is found. Output edges[k] = 1 marks an edge at sample k of the
// word (bit 0 oldest); one clock cycle of latency.
//
// The published design finds low-to-high transitions and states that no edge filtering
// is needed. Reset sets the remembered previous sample to 1, so a line that
// is already high when reset is released is not reported as a hit (this
// design's choice).
module edge_detect #(
  parameter int SPC = coinc_pkg::SPC
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [SPC-1:0] din,
  output logic [SPC-1:0] edges
);

  logic last_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_q <= 1'b1;
      edges  <= '0;
    end else begin
      last_q <= din[SPC-1];
      edges  <= din & ~{din[SPC-2:0], last_q};
    end
  end

endmodule
