// tb_bmc: random received phase pairs and all exact 8PSK pairs. For every
// subset the branch point must be the parallel path with the smallest sum
// of squared phase errors (lowest index on a tie) and the metric that sum
// >> 5, saturated at 15. An exact point must give metric 0 in its own
// subset, with its own uncoded bits as branch point.
module tb_bmc;
  timeunit 1ns; timeprecision 1ps;
  logic [6:0] ph1, ph2;
  logic [3:0] bm [8];
  logic [2:0] bp [8];
  bmc dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int err2(int ph, int sym);
    int e;
    e = ((ph - 16 * sym) % 128 + 128 + 64) % 128 - 64;
    return e * e;
  endfunction
  task automatic check_point();
    for (int s = 0; s < 8; s++) begin
      int best, bu, m, y1, y2;
      best = 1 << 30; bu = 0;
      for (int u = 0; u < 8; u++) begin
        // label bits: z5 z4 z3 = u, z2 z1 z0 = s
        y1 = 4 * ((u >> 2) & 1) + 2 * (u & 1) + ((s >> 1) & 1);
        y2 = (y1 + 4 * ((u >> 1) & 1) + 2 * ((s >> 2) & 1) + (s & 1)) % 8;
        m = err2(ph1, y1) + err2(ph2, y2);
        if (m < best) begin best = m; bu = u; end
      end
      checks++;
      if (bp[s] != 3'(bu) || int'(bm[s]) != ((best >> 5) > 15 ? 15 : best >> 5)) begin
        failures++;
        if (failures < 5) $display("ph %0d %0d subset %0d: bp %0d bm %0d exp %0d %0d",
                                   ph1, ph2, s, bp[s], bm[s], bu, best >> 5);
      end
    end
  endtask
  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        ph1 = 7'(16 * a); ph2 = 7'(16 * b); #1;
        check_point();
        begin
          int z1, z3, z5, c, z0, z2, z4, s, u;
          z1 = a & 1; z3 = (a >> 1) & 1; z5 = (a >> 2) & 1;
          c = (b - a + 8) % 8;
          z0 = c & 1; z2 = (c >> 1) & 1; z4 = (c >> 2) & 1;
          s = 4 * z2 + 2 * z1 + z0; u = 4 * z5 + 2 * z4 + z3;
          checks++;
          if (bm[s] != 0 || bp[s] != 3'(u)) failures++;
        end
      end
    for (int i = 0; i < 3000; i++) begin
      ph1 = 7'($urandom); ph2 = 7'($urandom); #1;
      check_point();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
