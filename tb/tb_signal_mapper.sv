// tb_signal_mapper: all 64 labels. y1 = 4 z5 + 2 z3 + z1, y2 = y1 + 4 z4 +
// 2 z2 + z0 (mod 8). Also checks that the 64 labels give 64 distinct
// 4D points and that adding 1 to both phases (a 45-degree rotation) leaves
// z0 and z2 unchanged.
module tb_signal_mapper;
  timeunit 1ns; timeprecision 1ps;
  logic [5:0] z;
  logic [2:0] y1, y2;
  signal_mapper dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int seen [64];
    int lab_of [64];
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 64; i++) begin
      int e1, e2;
      z = 6'(i);
      #1;
      e1 = 4 * z[5] + 2 * z[3] + z[1];
      e2 = (e1 + 4 * z[4] + 2 * z[2] + z[0]) % 8;
      checks++;
      if (y1 != 3'(e1) || y2 != 3'(e2)) begin
        failures++;
        $display("z=%b y1=%0d y2=%0d exp %0d %0d", z, y1, y2, e1, e2);
      end
      seen[8 * y1 + y2]++;
      lab_of[8 * y1 + y2] = i;
    end
    for (int p = 0; p < 64; p++) begin
      checks++;
      if (seen[p] != 1) failures++;
    end
    for (int p = 0; p < 64; p++) begin
      int r, a, b;
      a = p / 8; b = p % 8;
      r = 8 * ((a + 1) % 8) + (b + 1) % 8;
      checks++;
      if ((lab_of[p] & 5) != (lab_of[r] & 5)) failures++;   // z2, z0
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
