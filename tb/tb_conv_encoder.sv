// tb_conv_encoder: random inputs; the outputs are compared with equations
// (1a)-(1c) evaluated on the stored input history:
//   z2 = x2[n] ^ x1[n] ^ x1[n-2], z1 = x2[n-2] ^ x1[n] ^ x1[n-1] ^ x1[n-2],
//   z0 = x2[n-1], z5..z3 = x5..x3.
module tb_conv_encoder;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [4:0] x = '0;
  logic [5:0] z;
  state_t state;
  always #5 clk = !clk;
  conv_encoder dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic h2 [$], h1 [$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    h2 = '{0, 0}; h1 = '{0, 0};
    for (int n = 0; n < 500; n++) begin
      logic [5:0] exp;
      int k;
      x  = 5'($urandom);
      en = 1'b1;
      h2.push_back(x[1]); h1.push_back(x[0]);
      k = h2.size() - 1;
      #1;
      exp[5:3] = x[4:2];
      exp[2] = h2[k] ^ h1[k] ^ h1[k-2];
      exp[1] = h2[k-2] ^ h1[k] ^ h1[k-1] ^ h1[k-2];
      exp[0] = h2[k-1];
      checks++;
      if (z !== exp) begin
        failures++;
        if (failures < 5) $display("n=%0d x=%b z=%b exp=%b", n, x, z, exp);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
