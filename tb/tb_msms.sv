// tb_msms: random groups of 16 metrics (with a common random offset, so they
// wrap around 255) in random state order. After the 16th the block must
// report the modulo-smallest metric and its state (first seen on a tie).
module tb_msms;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, first = 1'b0, wr_valid = 1'b0;
  state_t wr_state = '0, min_state;
  logic [7:0] wr_sm = '0, min_sm;
  logic done;
  always #5 clk = !clk;
  msms dut (.*);
  int checks = 0, failures = 0, ndone = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && done) ndone++;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int it = 0; it < 200; it++) begin
      int base, bestv, bests;
      int order [16];
      int vals [16];
      base = int'($urandom_range(255));
      foreach (order[i]) order[i] = i;
      order.shuffle();
      bestv = 1000; bests = 0;
      for (int i = 0; i < 16; i++) begin
        vals[i] = int'($urandom_range(60));
        if (vals[i] < bestv) begin bestv = vals[i]; bests = order[i]; end
      end
      first <= 1'b1;
      @(posedge clk);
      first <= 1'b0;
      for (int i = 0; i < 16; i++) begin
        wr_valid <= 1'b1;
        wr_state <= state_t'(order[i]);
        wr_sm    <= 8'(base + vals[i]);
        @(posedge clk);
      end
      wr_valid <= 1'b0;
      @(posedge clk);
      checks++;
      if (min_sm != 8'(base + bestv) || min_state != state_t'(bests)) begin
        failures++;
        if (failures < 5) $display("it %0d: %0d/%0d exp %0d/%0d", it, min_sm, min_state, 8'(base + bestv), bests);
      end
    end
    repeat (2) @(posedge clk);
    checks++;
    if (ndone != 200) begin failures++; $display("done %0d", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
