// tb_rx_symbol_sync: 2D phases 0,1,2,... sent with an asynchronous symbol
// clock (data change on its rising edge). Every second symbol must give a
// start pulse with the pair (2k, 2k+1) for delay_sel = 0, and the pair one
// symbol earlier, (2k-1, 2k), after switching to delay_sel = 1.
module tb_rx_symbol_sync;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, rx_sym_clk = 1'b0, delay_sel = 1'b0;
  logic [6:0] phase = '0, ph1, ph2;
  logic start, datclk;
  always #50 clk = !clk;
  rx_symbol_sync dut (.*);
  int checks = 0, failures = 0, nstart = 0;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int last_sent = -1;
  always @(posedge clk) if (rst_n && start) begin
    int e1;
    nstart++;
    e1 = delay_sel ? last_sent - 2 : last_sent - 1;
    checks++;
    if (ph1 != 7'(e1) || ph2 != 7'(e1 + 1)) begin
      failures++;
      if (failures < 5) $display("pair %0d %0d expected %0d %0d", ph1, ph2, e1, e1 + 1);
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      if (s == 101) delay_sel = 1'b1;
      #13;
      phase = 7'(s);
      rx_sym_clk = 1'b1;
      #1700;
      last_sent = s;
      rx_sym_clk = 1'b0;
      #1487;
    end
    checks++;
    if (nstart != 100) begin failures++; $display("starts %0d", nstart); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
