// tb_decoder_ctrl: every start must give an iteration of exactly 23 cycles
// (cyc 0..22 in order, first on cycle 0) and advance iter; a start during an
// iteration must be flagged as an overrun and ignored.
module tb_decoder_ctrl;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic first, busy, overrun;
  logic [4:0] cyc;
  logic [5:0] iter;
  always #5 clk = !clk;
  decoder_ctrl dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int novr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 20; it++) begin
      int busy_cycles;
      @(negedge clk);
      start = 1'b1;
      busy_cycles = 0;
      for (int c = 0; c < 40; c++) begin
        #1;
        if (busy) begin
          checks++;
          if (cyc != 5'(c) || first != (c == 0)) failures++;
          busy_cycles++;
        end
        if (c == 10 && it % 4 == 1) begin            // too early
          start = 1'b1;
          #1;
          if (overrun) novr++;
        end
        @(negedge clk);
        start = 1'b0;
      end
      checks += 2;
      if (busy_cycles != 23) begin failures++; $display("busy %0d cycles", busy_cycles); end
      if (iter != 6'(it + 1)) failures++;
    end
    checks++;
    if (novr != 5) begin failures++; $display("overruns %0d", novr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
