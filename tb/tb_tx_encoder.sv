// tb_tx_encoder: 5-bit words, first in parallel and then in serial form (w1
// first), with the precoder on. The symbols on tx_sym, sampled at each
// rising edge of tx_sym_clk, must match a reference model of precoder,
// encoder and mapper, two symbols per word.
module tb_tx_encoder;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, tx_clk = 1'b0, tx_data_serial = 1'b0, serial_mode = 1'b0;
  logic diff_en = 1'b1;
  logic [4:0] tx_data_parallel = '0;
  logic [2:0] tx_sym;
  logic tx_sym_clk;
  always #5 clk = !clk;
  tx_encoder dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] m_prev = '0;
  logic [1:0] m_x2 = '0, m_x1 = '0;
  logic [2:0] exp_q [$];
  function automatic void model(logic [4:0] w);
    logic [2:0] d, y1;
    logic [4:0] x;
    logic z0, z1, z2;
    d = {w[4], w[2], w[0]} + m_prev;
    m_prev = d;
    x = {d[2], w[3], d[1], w[1], d[0]};
    z2 = x[1] ^ x[0] ^ m_x1[1];
    z1 = m_x2[1] ^ x[0] ^ m_x1[0] ^ m_x1[1];
    z0 = m_x2[0];
    m_x2 = {m_x2[0], x[1]};
    m_x1 = {m_x1[0], x[0]};
    y1 = {x[4], x[2], z1};
    exp_q.push_back(y1);
    exp_q.push_back(y1 + {x[3], z2, z0});
  endfunction

  logic sc_d = 1'b0;
  int nsym = 0;
  always @(posedge clk) begin
    sc_d <= tx_sym_clk;
    if (rst_n && tx_sym_clk && !sc_d) begin
      checks++;
      nsym++;
      if (exp_q.size() == 0) failures++;
      else begin
        logic [2:0] e;
        e = exp_q.pop_front();
        if (tx_sym != e) begin
          failures++;
          if (failures < 5) $display("sym %0d got %0d exp %0d", nsym, tx_sym, e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      logic [4:0] w;
      w = 5'($urandom);
      model(w);
      tx_data_parallel = w;
      tx_clk = 1'b1;
      repeat (30) @(posedge clk);
      tx_clk = 1'b0;
      repeat (30) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    // switching the input mode is a configuration change: reset in between
    rst_n = 1'b0;
    m_prev = '0; m_x2 = '0; m_x1 = '0;
    serial_mode = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      logic [4:0] w;
      w = 5'($urandom);
      model(w);
      for (int b = 0; b < 5; b++) begin
        tx_data_serial = w[b];
        tx_clk = 1'b1;
        repeat (8) @(posedge clk);
        tx_clk = 1'b0;
        repeat (8) @(posedge clk);
      end
    end
    repeat (200) @(posedge clk);
    checks++;
    if (nsym != 200) begin failures++; $display("symbols %0d, expected 200", nsym); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
