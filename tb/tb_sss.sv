// tb_sss: minimum state metrics fed once per iteration.
//   a) slow growth (rate <= threshold): no exceed, no toggle
//   b) fast growth with V = 5: toggle on the second exceed, then no further
//      toggle for 128 + V iterations although growth stays fast; further
//      toggles at least 128 + V iterations apart
//   c) V = 0: the SSS arms and disarms but never toggles
//   d) automatic mode off: the delay follows the manual switch
module tb_sss;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, min_valid = 1'b0, auto_en = 1'b1, manual_sel = 1'b0;
  logic [7:0] min_sm = '0;
  logic [6:0] threshold = 7'd10, span = 7'd5;
  logic delay_sel, exceeded;
  logic [1:0] leds;
  always #5 clk = !clk;
  sss dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int min_gap = 1 << 30;
  int it = 0, nexc = 0, ntog = 0, narm = 0, last_tog = -1, first_tog = -1, first_exc = -1;
  logic ds_d = 1'b0;
  always @(posedge clk) begin
    ds_d <= delay_sel;
    if (rst_n && exceeded) begin nexc++; if (first_exc < 0) first_exc = it; end
    if (rst_n && delay_sel != ds_d && auto_en) begin
      ntog++;
      if (first_tog < 0) first_tog = it;
      else if (it - last_tog < min_gap) min_gap = it - last_tog;
      last_tog = it;
    end
    if (dut.st_q == dut.ARMED && min_valid) narm++;
  end
  task automatic feed(int n, int step);
    for (int i = 0; i < n; i++) begin
      min_sm    <= min_sm + 8'(step);
      min_valid <= 1'b1;
      @(posedge clk);
      min_valid <= 1'b0;
      @(posedge clk);
      it++;
    end
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // a
    feed(60, 1);
    checks += 2;
    if (nexc != 0) failures++;
    if (ntog != 0) failures++;
    // b
    it = 0; first_tog = -1;
    feed(300, 5);
    repeat (3) @(posedge clk);
    $display("b: first exceed %0d, toggles %0d, first %0d, smallest gap %0d", first_exc, ntog, first_tog, min_gap);
    // the toggle is seen one iteration after the second exceed (edge detector)
    checks += 3;
    if (ntog < 2) failures++;
    if (first_tog != first_exc + 2) failures++;
    if (min_gap < 128 + 5) failures++;
    // c
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    span = 7'd0; ntog = 0; narm = 0;
    feed(100, 5);
    checks += 2;
    if (ntog != 0) failures++;
    if (narm == 0) failures++;
    // d
    auto_en = 1'b0;
    for (int i = 0; i < 4; i++) begin
      manual_sel = 1'(i);
      @(posedge clk);
      #1;
      checks++;
      if (delay_sel != manual_sel || leds != (manual_sel ? 2'b10 : 2'b01)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
