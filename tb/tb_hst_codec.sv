// tb_hst_codec: end-to-end test of the codec at its default parameters.
// Each phase resets the codec, streams random 5-bit words and checks that the
// decoded byte stream equals the sent one (after the decoding delay) once the
// decoder has settled:
//   1 loop-back, parallel input, precoder and postdecoder on
//   2 loop-back, bit-serial input, precoder and postdecoder off
//   3 external 5-bit I/Q samples (two's complement) with small phase noise
//     and one slipped 2D symbol: the signal set synchroniser must toggle
//     the symbol delay and the decoder must lock again
//   4 external hard-decision phases, with the state-metric reset pulsed
//   5 symbols sent faster than clk/23: the decoder must flag an overrun
// Mechanisms counted: loop-back, serial input, SSS toggle, SM reset,
// I/Q input, hard phase input, overrun.
module tb_hst_codec;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = !clk;

  logic [4:0] tx_data_parallel = '0;
  logic       tx_data_serial = 1'b0, tx_clk = 1'b0, tx_serial_mode = 1'b0, tx_diff_en = 1'b1;
  logic [2:0] tx_sym;
  logic       tx_sym_clk;
  logic [9:0] rx_in = '0;
  logic       rx_sym_clk = 1'b0, auto_synch = 1'b1, manual_synch = 1'b0, sm_reset = 1'b0;
  logic       diff_dec_en = 1'b1;
  logic [6:0] synch_threshold = 7'd4, synch_span = 7'd32;
  op_mode_e   operation = OP_LOOPBACK;
  iq_fmt_e    iq_type = IQ_TWOS;
  logic [4:0] rx_data_parallel;
  logic       rx_clk_parallel, rx_data_serial, rx_clk_serial, rx_error, overrun;
  logic [1:0] synch_state;

  hst_codec dut (.*);

  int checks = 0, failures = 0;
  int n_loop = 0, n_serial = 0, n_toggle = 0, n_smreset = 0, n_iq = 0, n_hard = 0, n_overrun = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitor
  logic [4:0] sent [$];
  logic [4:0] got  [$];
  logic       pclk_d = 1'b0;
  always @(posedge clk) begin
    pclk_d <= rx_clk_parallel;
    if (rst_n && rx_clk_parallel && !pclk_d) got.push_back(rx_data_parallel);
    if (rst_n && overrun) n_overrun++;
  end
  logic [1:0] ss_d = 2'b01;
  always @(posedge clk) begin
    ss_d <= synch_state;
    if (rst_n && ss_d != synch_state && auto_synch) n_toggle++;
  end

  // --------------------------------------------- reference encoder (model)
  logic [2:0] m_prev;
  logic [1:0] m_x2, m_x1;   // [0] = one symbol ago, [1] = two ago
  function automatic void model_reset();
    m_prev = '0; m_x2 = '0; m_x1 = '0;
  endfunction
  function automatic void model_enc(input logic [4:0] w, input bit diff,
                                    output logic [2:0] y1, output logic [2:0] y2);
    logic [4:0] x;
    logic [2:0] d;
    logic z0, z1, z2;
    x = w;
    if (diff) begin
      d = {w[4], w[2], w[0]} + m_prev;
      m_prev = d;
      x = {d[2], w[3], d[1], w[1], d[0]};
    end
    z2 = x[1] ^ x[0] ^ m_x1[1];
    z1 = m_x2[1] ^ x[0] ^ m_x1[0] ^ m_x1[1];
    z0 = m_x2[0];
    m_x2 = {m_x2[0], x[1]};
    m_x1 = {m_x1[0], x[0]};
    y1 = {x[4], x[2], z1};
    y2 = y1 + {x[3], z2, z0};
  endfunction

  // ------------------------------------------------------------- drivers
  task automatic send_parallel(int n, int period);
    for (int i = 0; i < n; i++) begin
      logic [4:0] w;
      w = 5'($urandom);
      sent.push_back(w);
      tx_data_parallel = w;
      tx_clk = 1'b1;
      repeat (period / 2) @(posedge clk);
      tx_clk = 1'b0;
      repeat (period - period / 2) @(posedge clk);
    end
  endtask

  task automatic send_serial(int n, int bit_period);
    for (int i = 0; i < n; i++) begin
      logic [4:0] w;
      w = 5'($urandom);
      sent.push_back(w);
      for (int b = 0; b < 5; b++) begin
        tx_data_serial = w[b];
        tx_clk = 1'b1;
        repeat (bit_period / 2) @(posedge clk);
        tx_clk = 1'b0;
        repeat (bit_period - bit_period / 2) @(posedge clk);
      end
    end
  endtask

  // 2D symbol on rx_in in the current operation mode
  function automatic logic [9:0] rx_word(logic [2:0] y, int noise);
    real ang, i_r, q_r;
    int  iv, qv;
    if (operation == OP_HARD) return {7'd0, y};
    ang = (real'(y) * 16.0 + real'(noise)) * 3.14159265358979 / 64.0;
    i_r = 13.0 * $cos(ang);
    q_r = 13.0 * $sin(ang);
    iv = $rtoi(i_r + (i_r >= 0 ? 0.5 : -0.5));
    qv = $rtoi(q_r + (q_r >= 0 ? 0.5 : -0.5));
    return {5'(iv), 5'(qv)};
  endfunction

  task automatic send_rx(int n, int sym_period, int slip_at, int noise_amp, bit diff, int reset_at);
    model_reset();
    for (int i = 0; i < n; i++) begin
      logic [4:0] w;
      logic [2:0] y [2];
      w = 5'($urandom);
      sent.push_back(w);
      model_enc(w, diff, y[0], y[1]);
      if (i == reset_at) begin
        sm_reset = 1'b1;
        @(posedge clk);
        sm_reset = 1'b0;
        n_smreset++;
      end
      for (int h = 0; h < 2; h++) begin
        int nz;
        if (i == slip_at && h == 1) continue;    // one 2D symbol lost
        nz = (noise_amp == 0) ? 0 : int'($urandom_range(2 * noise_amp)) - noise_amp;
        rx_in = rx_word(y[h], nz);
        rx_sym_clk = 1'b1;
        repeat (sym_period / 2) @(posedge clk);
        rx_sym_clk = 1'b0;
        repeat (sym_period - sym_period / 2) @(posedge clk);
      end
    end
  endtask

  // best alignment of the received words against the sent ones, checked
  // over the words from index 'from' of the received stream on
  task automatic check_stream(string name, int from);
    int best_d = 0, best_ok = -1, total;
    for (int d = 0; d < 4; d++) begin
      int ok = 0;
      for (int j = from; j < got.size(); j++)
        if (j + d < sent.size() && got[j] == sent[j + d]) ok++;
      if (ok > best_ok) begin best_ok = ok; best_d = d; end
    end
    total = 0;
    for (int j = from; j < got.size(); j++) begin
      if (j + best_d >= sent.size()) break;
      checks++;
      total++;
      if (got[j] != sent[j + best_d]) failures++;
    end
    $display("%s: sent %0d, decoded %0d, compared %0d, errors %0d (offset %0d)",
             name, sent.size(), got.size(), total, total - best_ok, best_d);
    checks++;
    if (total < 20) begin failures++; $display("%s: too few words compared", name); end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    sent.delete();
    got.delete();
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    // 1: loop-back, parallel, precoding on
    operation = OP_LOOPBACK; tx_serial_mode = 1'b0; tx_diff_en = 1'b1; diff_dec_en = 1'b1;
    do_reset();
    send_parallel(120, 60);
    repeat (200) @(posedge clk);
    check_stream("loopback parallel", 10);
    n_loop++;

    // 2: loop-back, serial, precoding off
    tx_serial_mode = 1'b1; tx_diff_en = 1'b0; diff_dec_en = 1'b0;
    do_reset();
    send_serial(100, 14);
    repeat (200) @(posedge clk);
    check_stream("loopback serial", 10);
    n_serial++;

    // 3: I/Q input with noise and one symbol slip
    operation = OP_IQ; iq_type = IQ_TWOS; diff_dec_en = 1'b1;
    do_reset();
    send_rx(460, 30, 60, 2, 1'b1, -1);
    repeat (200) @(posedge clk);
    check_stream("iq with slip", 300);
    n_iq++;

    // 4: hard phase input, state metrics cleared mid-stream
    operation = OP_HARD;
    do_reset();
    send_rx(120, 30, -1, 0, 1'b1, 60);
    repeat (200) @(posedge clk);
    check_stream("hard phase", 10);
    n_hard++;

    // 5: too fast: 2D symbol period of 8 cycles
    n_overrun = 0;
    do_reset();
    send_rx(20, 8, -1, 0, 1'b1, -1);

    $display("mechanisms: loopback=%0d serial=%0d sss_toggle=%0d sm_reset=%0d iq=%0d hard=%0d overrun=%0d",
             n_loop, n_serial, n_toggle, n_smreset, n_iq, n_hard, n_overrun);
    checks += 7;
    if (n_loop == 0) failures++;
    if (n_serial == 0) failures++;
    if (n_toggle == 0) failures++;
    if (n_smreset == 0) failures++;
    if (n_iq == 0) failures++;
    if (n_hard == 0) failures++;
    if (n_overrun == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
