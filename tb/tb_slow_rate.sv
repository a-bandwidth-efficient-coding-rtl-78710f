// tb_slow_rate: the decoder far below its top speed. 2D symbols arrive every
// 2000 clock cycles, so a 4D point every 4000 cycles: at a 10 MHz clock that
// is 2,500 points/s or 12.5 kbit/s. The sequencer must wait between
// iterations and still run each in 23 cycles; the byte clock and the serial
// bit clock (five bits spread over each 4000-cycle byte period) must follow
// the slow rate. Soft phases with noise; every byte must be decoded without
// error, with the same 34-period latency as at full speed.
module tb_slow_rate;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] rx_in = '0;
  logic rx_sym_clk = 1'b0;
  logic [2:0] loop_sym = '0;
  op_mode_e operation = OP_SOFT;
  iq_fmt_e iq_type = IQ_TWOS;
  logic auto_synch = 1'b1, manual_synch = 1'b0, sm_reset = 1'b0, diff_dec_en = 1'b1;
  logic [6:0] synch_threshold = 7'd20, synch_span = 7'd16;
  logic [4:0] rx_data_parallel;
  logic rx_clk_parallel, rx_data_serial, rx_clk_serial, rx_error, overrun;
  logic [1:0] synch_state;
  always #50 clk = !clk;
  viterbi_decoder dut (.*);
  localparam int NWORDS = 80;
  int checks = 0, failures = 0;
  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] m_prev = '0;
  logic [1:0] m_x2 = '0, m_x1 = '0;
  logic [4:0] sent [$];
  task automatic model_enc(input logic [4:0] w, output logic [2:0] y1, output logic [2:0] y2);
    logic [2:0] d;
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
    y2 = y1 + {x[3], z2, z0};
  endtask

  // iteration length
  int busy_run = 0, iters = 0, novr = 0;
  always @(posedge clk) if (rst_n && overrun) novr++;
  always @(posedge clk) begin
    if (rst_n && dut.busy) busy_run++;
    else if (busy_run != 0) begin
      iters++;
      checks++;
      if (busy_run != 23) failures++;
      busy_run = 0;
    end
  end

  // outputs
  logic pc_d = 1'b0, sc_d = 1'b0;
  int nout = 0, nerr = 0, bidx = 0, nbits = 0;
  logic [4:0] cur = '0;
  always @(posedge clk) begin
    pc_d <= rx_clk_parallel;
    sc_d <= rx_clk_serial;
    if (rst_n && rx_clk_parallel && !pc_d) begin
      nout++;
      checks++;
      cur = rx_data_parallel;
      bidx = 0;
      if (nout - 1 >= sent.size() || rx_data_parallel != sent[nout - 1]) begin
        failures++; nerr++;
        if (nerr < 6) $display("out %0d = %0d, sent %0d %0d %0d", nout - 1, rx_data_parallel, sent[nout-2 < 0 ? 0 : nout-2], sent[nout - 1], sent[nout]);
      end
      // latency: the byte of iteration m is output during iteration m+34
      checks++;
      if (int'(dut.u_ctrl.iter) != (nout - 1 + 34) % 64) begin
        failures++;
        if (failures < 5) $display("byte %0d output in iteration %0d", nout - 1, dut.u_ctrl.iter);
      end
    end
    if (rst_n && rx_clk_serial && !sc_d && nout >= 2) begin
      checks++;
      nbits++;
      if (bidx > 4 || rx_data_serial != cur[bidx]) failures++;
      bidx++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NWORDS; i++) begin
      logic [4:0] w;
      logic [2:0] y [2];
      w = 5'($urandom);
      sent.push_back(w);
      model_enc(w, y[0], y[1]);
      for (int h = 0; h < 2; h++) begin
        int nz;
        nz = int'($urandom_range(12)) - 6;
        rx_in = {3'b000, 7'(16 * int'(y[h]) + nz)};
        rx_sym_clk = 1'b1;
        repeat (1000) @(posedge clk);
        rx_sym_clk = 1'b0;
        repeat (1000) @(posedge clk);
      end
    end
    repeat (5000) @(posedge clk);
    $display("overruns %0d", novr);
    $display("iterations %0d, bytes out %0d, byte errors %0d, serial bits %0d", iters, nout, nerr, nbits);
    checks += 2;
    if (nout != NWORDS - 34) failures++;
    checks++;
    if (novr != 0) failures++;
    if (nbits < 5 * (nout - 2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
