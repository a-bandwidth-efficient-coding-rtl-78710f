// tb_rate_mult: ticks every 60 cycles into a 5-times multiplier. After the
// first period, every period must hold exactly 5 slots spaced 12 cycles
// apart with indices 0..4, and clk_out must rise once per slot.
module tb_rate_mult;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic slot, clk_out;
  logic [2:0] idx;
  always #5 clk = !clk;
  rate_mult #(.N(5)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int t = 0, last_slot = -1, nslot = 0, rises = 0, exp_idx = 0;
  logic co_d = 1'b0;
  always @(posedge clk) begin
    t++;
    co_d <= clk_out;
    if (t > 130 && clk_out && !co_d) rises++;
    if (slot && t > 130) begin
      if (last_slot >= 0) begin
        checks++;
        if (idx != (tick ? 3'd0 : 3'(exp_idx))) failures++;
        checks++;
        if (t - last_slot != 12) begin
        $display("idx %0d", idx);
          failures++;
          $display("slot spacing %0d at t=%0d", t - last_slot, t);
        end
      end
      last_slot = t;
      exp_idx = int'(idx) + 1;
      nslot++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 20; p++) begin
      tick <= 1'b1;
      @(posedge clk);
      tick <= 1'b0;
      repeat (59) @(posedge clk);
    end
    $display("slots %0d rises %0d", nslot, rises);
    checks += 2;
    if (nslot < 5 * 17 || nslot > 5 * 18) begin failures++; end
    if (rises < 5 * 18 - 1) begin failures++; $display("rises %0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
