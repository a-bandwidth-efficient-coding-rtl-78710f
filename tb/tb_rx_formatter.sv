// tb_rx_formatter: hard and soft phase pass-through, loop-back, and the I/Q
// to phase conversion for every one of the 1024 two's complement I/Q pairs
// against round(atan2(Q, I) * 64 / pi) mod 128 (one sector of slack for
// points on a boundary); then the other three number formats must give the
// same phase as the equivalent two's complement pair.
module tb_rx_formatter;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;
  op_mode_e operation;
  iq_fmt_e  iq_type;
  logic [9:0] rx_in;
  logic [2:0] loop_sym;
  logic [6:0] phase;
  rx_formatter dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [4:0] enc(int v, iq_fmt_e f);
    case (f)
      IQ_TWOS:    return 5'(v);
      IQ_SIGNMAG: return (v < 0) ? {1'b1, 4'(-v)} : {1'b0, 4'(v)};
      IQ_REVBIN:  return ~5'(v + 16);
      default:    return 5'(v + 16);
    endcase
  endfunction
  initial begin
    int exact = 0;
    loop_sym = '0;
    operation = OP_HARD; iq_type = IQ_TWOS;
    for (int p = 0; p < 8; p++) begin
      rx_in = {7'h55, 3'(p)}; #1;
      checks++; if (phase != 7'(16 * p)) failures++;
    end
    operation = OP_SOFT;
    for (int p = 0; p < 128; p++) begin
      rx_in = {3'b101, 7'(p)}; #1;
      checks++; if (phase != 7'(p)) failures++;
    end
    operation = OP_LOOPBACK;
    for (int p = 0; p < 8; p++) begin
      loop_sym = 3'(p); #1;
      checks++; if (phase != 7'(16 * p)) failures++;
    end
    operation = OP_IQ;
    for (int i = -15; i < 16; i++)
      for (int q = -15; q < 16; q++) begin
        real a;
        int e, d;
        if (i == 0 && q == 0) continue;
        iq_type = IQ_TWOS;
        rx_in = {5'(i), 5'(q)}; #1;
        a = $atan2(real'(q), real'(i)) * 64.0 / 3.14159265358979;
        e = ($rtoi(a + 128.5 + 0.0) ) % 128;
        if (a + 128.5 < 0) e = 0;
        d = (int'(phase) - e + 128) % 128;
        checks++;
        if (d == 0) exact++;
        else if (d != 1 && d != 127) begin
          failures++;
          if (failures < 5) $display("I=%0d Q=%0d phase=%0d exp=%0d", i, q, phase, e);
        end
        for (int f = 1; f < 4; f++) begin
          logic [6:0] ref_ph;
          ref_ph = phase;
          iq_type = iq_fmt_e'(f);
          rx_in = {enc(i, iq_type), enc(q, iq_type)}; #1;
          checks++;
          if (phase != ref_ph) begin
            failures++;
            if (failures < 5) $display("fmt %0d I=%0d Q=%0d", f, i, q);
          end
          iq_type = IQ_TWOS;
          rx_in = {5'(i), 5'(q)}; #1;
        end
      end
    $display("exact I/Q sectors: %0d of 960", exact);
    checks++;
    if (exact < 900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
