// tb_diff_encoder: random words through the mod-8 differential precoder;
// (x5,x3,x1) must be the running mod-8 sum of (w5,w3,w1), w4/w2 must pass,
// and with bypass set x must equal w and the running sum must hold.
module tb_diff_encoder;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bypass = 1'b0;
  logic [4:0] w = '0, x;
  always #5 clk = !clk;
  diff_encoder dut (.*);
  int checks = 0, failures = 0;
  logic [2:0] sum3;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int acc;
    acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 400; i++) begin
      logic [4:0] exp;
      bypass = (i % 7 == 3);
      w  = 5'($urandom);
      en = 1'b1;
      #1;
      if (bypass) exp = w;
      else begin
        sum3 = 3'(acc + 4 * int'(w[4]) + 2 * int'(w[2]) + int'(w[0]));
        exp  = {sum3[2], w[3], sum3[1], w[1], sum3[0]};
        acc  = int'(sum3);
      end
      checks++;
      if (x !== exp) begin
        failures++;
        if (failures < 5) $display("i=%0d w=%b x=%b exp=%b", i, w, x, exp);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
