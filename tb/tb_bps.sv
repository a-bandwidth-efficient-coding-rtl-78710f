// tb_bps: random branch points for every iteration and a random decoded bit
// stream delivered 33 iterations late (as the SSM does). In iteration m+34
// the BPS must output {bp[m][subset], x2, x1} of iteration m, where the
// subset comes from re-encoding the decoded bits with equations (1a)-(1c).
module tb_bps;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, busy = 1'b0, dec_valid = 1'b0;
  logic [4:0] cyc = '0;
  logic [5:0] iter = '0;
  logic [2:0] bp [8];
  logic [1:0] dec_x = '0;
  logic out_valid;
  logic [4:0] out_x;
  always #5 clk = !clk;
  bps dut (.*);
  int checks = 0, failures = 0, nout = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [23:0] bph [$];
  logic [1:0]  xh [$];
  int          subh [$];
  int cur_it = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int m;
    m = cur_it - 34;
    nout++;
    checks++;
    if (m < 0 || out_x != {bph[m][3 * subh[m] +: 3], xh[m]}) begin
      failures++;
      if (failures < 5) $display("iteration %0d: got %b", cur_it, out_x);
    end
  end
  initial begin
    logic x2d1, x2d2, x1d1, x1d2;
    x2d1 = 0; x2d2 = 0; x1d1 = 0; x1d2 = 0;
    foreach (bp[i]) bp[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 120; it++) begin
      logic [1:0] x;
      logic [23:0] word;
      logic z2, z1, z0;
      cur_it = it;
      x = 2'($urandom);
      word = 24'($urandom);
      xh.push_back(x);
      bph.push_back(word);
      z2 = x[1] ^ x[0] ^ x1d2;
      z1 = x2d2 ^ x[0] ^ x1d1 ^ x1d2;
      z0 = x2d1;
      subh.push_back(int'({z2, z1, z0}));
      x2d2 = x2d1; x2d1 = x[1]; x1d2 = x1d1; x1d1 = x[0];
      for (int s = 0; s < 8; s++) bp[s] = word[3 * s +: 3];
      for (int c = 0; c < 23; c++) begin
        busy <= 1'b1;
        cyc  <= 5'(c);
        iter <= 6'(it);
        dec_valid <= (c == 1 && it >= 33);
        dec_x     <= (it >= 33) ? xh[it - 33] : 2'b00;
        @(posedge clk);
      end
      busy <= 1'b0; dec_valid <= 1'b0; cyc <= '0;
      repeat (2) @(posedge clk);
    end
    checks++;
    if (nout != 120 - 34) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
