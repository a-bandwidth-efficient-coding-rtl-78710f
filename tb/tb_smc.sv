// tb_smc: the SMC runs 60 iterations with random branch metrics. A
// reference add-compare-select over the 16 states (four predecessors each,
// modulo comparison, lowest path decision on a tie) predicts every new
// metric and path decision; each state must be written exactly once per
// iteration, on cycles 7..22 only. Midway the metrics are cleared and the
// reference restarts from zero.
module tb_smc;
  timeunit 1ns; timeprecision 1ps;
  import hst_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, busy = 1'b0;
  logic [4:0] cyc = '0;
  logic [3:0] bm [8];
  logic wr_valid;
  state_t wr_state;
  logic [7:0] wr_sm;
  pd_t wr_pd;
  always #5 clk = !clk;
  smc dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ref_sm [16], new_sm [16];
  int         ref_pd [16];
  int         seen [16];

  function automatic void ref_step();
    for (int ns = 0; ns < 16; ns++) begin
      logic [7:0] best;
      int bk;
      for (int k = 0; k < 4; k++) begin
        int p, x2, x1, a1, a2, b1, b2, z2, z1, z0;
        logic [7:0] s;
        x2 = (ns >> 3) & 1; a1 = (ns >> 2) & 1; x1 = (ns >> 1) & 1; b1 = ns & 1;
        a2 = k >> 1; b2 = k & 1;
        p  = 8 * a1 + 4 * a2 + 2 * b1 + b2;
        z2 = x2 ^ x1 ^ b2;
        z1 = a2 ^ x1 ^ b1 ^ b2;
        z0 = a1;
        s = ref_sm[p] + 8'(bm[4 * z2 + 2 * z1 + z0]);
        if (k == 0 || signed'(8'(s - best)) < 0) begin best = s; bk = k; end
      end
      new_sm[ns] = best;
      ref_pd[ns] = bk;
    end
  endfunction

  always @(posedge clk) if (rst_n && wr_valid) begin
    checks++;
    if (!busy || cyc < 5'd7 || cyc > 5'd22) failures++;
    seen[wr_state]++;
    if (wr_sm != new_sm[wr_state] || int'(wr_pd) != ref_pd[wr_state]) begin
      failures++;
      if (failures < 5) $display("state %0d: sm %0d pd %0d exp %0d %0d", wr_state, wr_sm, wr_pd,
                                 new_sm[wr_state], ref_pd[wr_state]);
    end
  end

  initial begin
    foreach (ref_sm[i]) ref_sm[i] = '0;
    foreach (bm[i]) bm[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 60; it++) begin
      if (it == 30) begin
        clr <= 1'b1;
        @(posedge clk);
        clr <= 1'b0;
        foreach (ref_sm[i]) ref_sm[i] = '0;
      end
      foreach (bm[i]) bm[i] = 4'($urandom);
      foreach (seen[i]) seen[i] = 0;
      ref_step();
      for (int c = 0; c < 23; c++) begin
        busy <= 1'b1;
        cyc  <= 5'(c);
        @(posedge clk);
      end
      busy <= 1'b0;
      cyc  <= '0;
      @(posedge clk);
      for (int s = 0; s < 16; s++) begin
        checks++;
        if (seen[s] != 1) failures++;
      end
      ref_sm = new_sm;
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
