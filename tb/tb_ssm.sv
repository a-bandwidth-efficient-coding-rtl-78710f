// tb_ssm: a random state path is written into the survivor memory: in each
// iteration the true state gets the path decision that points to its true
// predecessor and every other state a random one, in the SMC's write order
// and cycles. The true state is given as the best state. The SSM must then
// return the path's input bits {x2, x1} of iteration m in iteration m+33,
// with dec_valid first high in iteration 33.
module tb_ssm;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, first = 1'b0, busy = 1'b0, wr_valid = 1'b0;
  logic [4:0] cyc = '0, iter = '0;
  state_t wr_state = '0, best_state = '0;
  pd_t wr_pd = '0;
  logic dec_valid;
  logic [1:0] dec_x;
  always #5 clk = !clk;
  ssm dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  state_t path [$];
  logic [1:0] xin [$];
  int cur_it = 0, first_valid = -1;
  always @(posedge clk) if (rst_n && dec_valid) begin
    if (first_valid < 0) first_valid = cur_it;
    checks++;
    if (cur_it < 33 || dec_x != xin[cur_it - 33]) begin
      failures++;
      if (failures < 5) $display("iteration %0d: got %b", cur_it, dec_x);
    end
  end
  initial begin
    state_t s;
    s = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 150; it++) begin
      logic [1:0] x;
      state_t prev;
      cur_it = it;
      x = 2'($urandom);
      prev = s;
      s = {x[1], prev[3], x[0], prev[1]};
      xin.push_back(x);
      for (int c = 0; c < 23; c++) begin
        first <= (c == 0);
        busy  <= 1'b1;
        cyc   <= 5'(c);
        iter  <= 5'(it);
        if (c >= 7) begin
          int g, i;
          state_t ns;
          g = (c - 7) / 4; i = (c - 7) % 4;
          ns = {1'(i >> 1), 1'(g >> 1), 1'(i), 1'(g)};
          wr_valid <= 1'b1;
          wr_state <= ns;
          wr_pd    <= (ns == s) ? {prev[2], prev[0]} : 2'($urandom);
        end else wr_valid <= 1'b0;
        @(posedge clk);
      end
      first <= 1'b0; busy <= 1'b0; wr_valid <= 1'b0; cyc <= '0;
      best_state <= s;
      repeat (3) @(posedge clk);
    end
    checks += 2;
    if (first_valid != 33) begin failures++; $display("first valid at %0d", first_valid); end
    if (checks < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
