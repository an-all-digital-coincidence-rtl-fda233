// hist_sweep: automatic coincidence-histogram procedure.
//
// After a start pulse the module sweeps the delay of one channel over
// 0 .. BINS-1 sampling periods (T = 330 ps; 60 bins cover 0 .. 19.47 ns).
// For every bin it drives the bin number on delay_out, waits SETTLE cycles
// so that the pipeline behind the delay line holds only data taken with the
// new delay, then counts the trigger pulses during `dwell` clock cycles and
// writes the count into bin memory. busy is high for the whole sweep and
// done pulses for one cycle at its end. Counters saturate at all ones.
// The bin memory is read through rd_addr / rd_data with one cycle of read
// latency, at any time.
//
// Sweep length: BINS * (SETTLE + dwell + 1) cycles.
//
// The published design gives the procedure: sweep the delay in steps of the sampling
// period over 19.47 ns, count coincidences per bin for a fixed acquisition
// time (0.1 s and 300 s per bin there), and read the histogram to place the
// coincidence window. The state machine, the settle time, the bin memory and
// its read port are this design's own.
module hist_sweep #(
  parameter int BINS    = coinc_pkg::HIST_BINS,
  parameter int DELAY_W = coinc_pkg::DELAY_W,
  parameter int COUNT_W = coinc_pkg::COUNT_W,
  parameter int DWELL_W = coinc_pkg::DWELL_W,
  parameter int SETTLE  = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,      // pulse: begin a sweep (ignored while busy)
  input  logic [DWELL_W-1:0] dwell,      // counting time per bin, in clock cycles
  input  logic               trig_in,    // validated coincidence trigger
  output logic               busy,
  output logic               done,
  output logic [DELAY_W-1:0] delay_out,  // delay for the swept channel
  input  logic [DELAY_W-1:0] rd_addr,
  output logic [COUNT_W-1:0] rd_data
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_COUNT, S_WRITE} state_t;

  localparam int SETTLE_W = $clog2(SETTLE + 1);

  state_t               state;
  logic [DELAY_W-1:0]   bin;
  logic [SETTLE_W-1:0]  settle_cnt;
  logic [DWELL_W-1:0]   dwell_cnt;
  logic [COUNT_W-1:0]   count;
  logic [COUNT_W-1:0]   mem [BINS];

  assign busy      = (state != S_IDLE);
  assign delay_out = bin;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      bin        <= '0;
      settle_cnt <= '0;
      dwell_cnt  <= '0;
      count      <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            bin        <= '0;
            settle_cnt <= '0;
            state      <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          if (int'(settle_cnt) == SETTLE - 1) begin
            dwell_cnt <= '0;
            count     <= '0;
            state     <= (dwell == '0) ? S_WRITE : S_COUNT;
          end else begin
            settle_cnt <= settle_cnt + 1'b1;
          end
        end
        S_COUNT: begin
          if (trig_in && count != '1) count <= count + 1'b1;
          if (dwell_cnt == dwell - 1'b1) state <= S_WRITE;
          else                           dwell_cnt <= dwell_cnt + 1'b1;
        end
        S_WRITE: begin
          if (int'(bin) == BINS - 1) begin
            state <= S_IDLE;
            bin   <= '0;
            done  <= 1'b1;
          end else begin
            bin        <= bin + 1'b1;
            settle_cnt <= '0;
            state      <= S_SETTLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Bin memory: one write per bin, synchronous read.
  always_ff @(posedge clk) begin
    if (state == S_WRITE) mem[bin] <= count;
    rd_data <= (int'(rd_addr) < BINS) ? mem[rd_addr] : '0;
  end

  // done ends a sweep: it is only raised on the way back to idle.
  a_done_idle: assert property (@(posedge clk) disable iff (rst) done |-> state == S_IDLE);
  // the swept delay never leaves the bin range
  a_bin_range: assert property (@(posedge clk) disable iff (rst) int'(bin) < BINS);

endmodule
