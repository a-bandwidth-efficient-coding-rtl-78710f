// smc: State Metric Calculator, a single serial 4:1 add-compare-select unit
// shared by the 16 states. The metrics live in two 16-entry banks used in
// turn: one iteration reads the old metrics from one bank and writes the new
// ones to the other, the next iteration the other way round.
// The four predecessors of new state {x2, a1, x1, b1} are {a1, k1, b1, k0}
// for PD k = 0..3, so the four new states with the same (a1, b1) share one
// group of four old metrics. Timing within an iteration (cyc):
//   1-16   one old metric read per cycle, group g = (cyc-1)/4
//   5-20   ACS stage 1: four additions, two compares (one new state/cycle)
//   6-21   ACS stage 2: final compare, new metric and 2-bit path decision
//   7-22   write of the new metric; wr_* show it for MSMS and SSM
// Metrics are 8-bit and free-running; compares use the sign of the
// two's complement difference, so no normalisation is needed.
// clr (the reset button) forces every metric to zero.
module smc
  import hst_pkg::*;
#(
  parameter int SM_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [4:0]      cyc,
  input  logic            busy,
  input  logic [3:0]      bm [8],
  output logic            wr_valid,
  output state_t          wr_state,
  output logic [SM_W-1:0] wr_sm,
  output pd_t             wr_pd
);
  typedef logic [SM_W-1:0] sm_t;

  sm_t    ram0 [NSTATES];
  sm_t    ram1 [NSTATES];
  logic   rbank_q;            // bank read in this iteration
  sm_t    rd;
  state_t raddr;
  sm_t    hold_q [3];
  sm_t    grp_q  [4];

  // read side ------------------------------------------------------------
  logic       rd_en;
  logic [3:0] rsel;
  assign rd_en = busy && cyc >= 5'd1 && cyc <= 5'd16;
  assign rsel  = 4'(cyc - 5'd1);                 // {g1, g0, k1, k0}
  assign raddr = {rsel[3], rsel[1], rsel[2], rsel[0]};
  assign rd    = rbank_q ? ram1[raddr] : ram0[raddr];

  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (rsel[1:0] != 2'd3) hold_q[rsel[1:0]] <= rd;
      else                   grp_q <= '{hold_q[0], hold_q[1], hold_q[2], rd};
    end
  end

  // ACS stage 1 -----------------------------------------------------------
  logic   s1_en;
  logic [3:0] asel;
  state_t ns1;
  sm_t    sum [4];
  sm_t    w01_q, w23_q;
  logic   p01_q, p23_q;
  logic   v1_q;
  state_t ns1_q;

  assign s1_en = busy && cyc >= 5'd5 && cyc <= 5'd20;
  assign asel  = 4'(cyc - 5'd5);                 // {g1, g0, i1, i0}
  assign ns1   = {asel[1], asel[3], asel[0], asel[2]};

  always_comb
    for (int k = 0; k < 4; k++)
      sum[k] = grp_q[k] + sm_t'(bm[branch_subset(pred_state(ns1, 2'(k)), ns1[3], ns1[1])]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q  <= 1'b0;
      ns1_q <= '0;
      w01_q <= '0;
      w23_q <= '0;
      p01_q <= 1'b0;
      p23_q <= 1'b0;
    end else begin
      v1_q <= s1_en;
      if (s1_en) begin
        ns1_q <= ns1;
        p01_q <= sm_less(sum[1], sum[0]);
        w01_q <= sm_less(sum[1], sum[0]) ? sum[1] : sum[0];
        p23_q <= sm_less(sum[3], sum[2]);
        w23_q <= sm_less(sum[3], sum[2]) ? sum[3] : sum[2];
      end
    end
  end

  // ACS stage 2 -----------------------------------------------------------
  logic sel23;
  assign sel23 = sm_less(w23_q, w01_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid <= 1'b0;
      wr_state <= '0;
      wr_sm    <= '0;
      wr_pd    <= '0;
    end else begin
      wr_valid <= v1_q;
      if (v1_q) begin
        wr_state <= ns1_q;
        wr_sm    <= sel23 ? w23_q : w01_q;
        wr_pd    <= sel23 ? {1'b1, p23_q} : {1'b0, p01_q};
      end
    end
  end

  // write side and bank swap ----------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbank_q <= 1'b0;
      for (int s = 0; s < NSTATES; s++) begin
        ram0[s] <= '0;
        ram1[s] <= '0;
      end
    end else if (clr) begin
      rbank_q <= 1'b0;
      for (int s = 0; s < NSTATES; s++) begin
        ram0[s] <= '0;
        ram1[s] <= '0;
      end
    end else begin
      if (wr_valid) begin
        if (rbank_q) ram0[wr_state] <= wr_sm;
        else         ram1[wr_state] <= wr_sm;
      end
      if (busy && cyc == 5'd22) rbank_q <= !rbank_q;
    end
  end

endmodule
