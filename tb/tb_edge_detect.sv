// tb_edge_detect: random sample words; an edge is expected wherever a 1
// follows a 0 in the continuous stream, including across word boundaries.
// A line that is high at reset release gives no edge. One clock latency.
module tb_edge_detect;
  localparam int SPC = 12;
  logic clk = 0, rst = 1;
  logic [SPC-1:0] din = '1, edges;
  int checks = 0, failures = 0;
  bit last;

  edge_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [SPC-1:0] exp_w;
    repeat (3) @(negedge clk);
    rst = 0;
    last = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      din = (cyc == 0) ? SPC'('1) : ((cyc % 5 == 0) ? SPC'(12'hF0F) : SPC'($urandom));
      for (int k = 0; k < SPC; k++) begin
        exp_w[k] = din[k] && !last;
        last = din[k];
      end
      @(negedge clk);
      checks++;
      if (edges !== exp_w) begin
        failures++;
        if (failures < 10) $display("cyc %0d: din %b got %b exp %b", cyc, din, edges, exp_w);
      end
    end
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
