// tb_post_decoder: decoded words every 50 cycles. With the postdecoder on,
// the byte output must be the mod-8 difference of successive (x5,x3,x1)
// with x4, x2 passed; with it off, the word itself. The serial output,
// sampled at each rising edge of the bit clock, must give the bytes w1
// first, five bits per byte.
module tb_post_decoder;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, diff_en = 1'b1;
  logic [4:0] in_x = '0, rx_data_parallel;
  logic rx_clk_parallel, rx_data_serial, rx_clk_serial;
  always #5 clk = !clk;
  post_decoder dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [4:0] pexp [$];
  logic sc_d = 1'b0, pc_d = 1'b0;
  int nbits = 0, nbytes = 0;
  logic [4:0] cur;
  int bidx = 0;
  always @(posedge clk) begin
    sc_d <= rx_clk_serial;
    pc_d <= rx_clk_parallel;
    if (rst_n && rx_clk_parallel && !pc_d) begin
      nbytes++;
      checks++;
      cur  = (pexp.size() > 0) ? pexp[0] : 5'd0;
      bidx = 0;
      if (pexp.size() == 0 || rx_data_parallel != pexp.pop_front()) failures++;
    end
    // the first byte after reset has no measured period yet: serial bits
    // are checked from the second byte on
    if (rst_n && rx_clk_serial && !sc_d && nbytes >= 2) begin
      checks++;
      if (bidx > 4 || rx_data_serial != cur[bidx]) begin
        failures++;
        if (failures < 5) $display("byte %0d bit %0d got %b", nbytes, bidx, rx_data_serial);
      end
      bidx++;
      nbits++;
    end
  end
  initial begin
    logic [2:0] prev;
    prev = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 80; i++) begin
      logic [4:0] x, w;
      logic [2:0] d;
      x = 5'($urandom);
      diff_en <= (i < 50);
      d = {x[4], x[2], x[0]} - prev;
      prev = {x[4], x[2], x[0]};
      w = (i < 50) ? {d[2], x[3], d[1], x[1], d[0]} : x;
      pexp.push_back(w);
      in_valid <= 1'b1;
      in_x <= x;
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (49) @(posedge clk);
    end
    repeat (60) @(posedge clk);
    checks += 2;
    if (nbits != 5 * 79) begin failures++; $display("bits %0d", nbits); end
    if (nbytes != 80) begin failures++; $display("bytes %0d", nbytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
