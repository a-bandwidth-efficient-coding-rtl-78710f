// msms: Minimum State Metric Selector. It watches the 16 new state metrics
// as the SMC writes them (one per cycle, in any state order) and keeps the
// smallest, comparing in two's complement like the ACS so that free-running
// 8-bit metrics compare correctly across wrap-around. After the 16th metric
// it registers the minimum and its state and pulses done. The state starts
// the survivor traceback; the minimum feeds the signal set synchroniser.
// Ties keep the metric seen first. The count restarts at each iteration's
// first cycle.
module msms
  import hst_pkg::*;
#(
  parameter int SM_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            first,
  input  logic            wr_valid,
  input  state_t          wr_state,
  input  logic [SM_W-1:0] wr_sm,
  output logic            done,
  output logic [SM_W-1:0] min_sm,
  output state_t          min_state
);
  logic [3:0]      n_q;
  logic [SM_W-1:0] run_sm_q;
  state_t          run_st_q;
  logic [SM_W-1:0] cur_sm;
  state_t          cur_st;
  logic [SM_W-1:0] diff;

  always_comb begin
    diff = wr_sm - run_sm_q;
    if (n_q == 0 || diff[SM_W-1]) begin
      cur_sm = wr_sm;
      cur_st = wr_state;
    end else begin
      cur_sm = run_sm_q;
      cur_st = run_st_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q       <= '0;
      run_sm_q  <= '0;
      run_st_q  <= '0;
      done      <= 1'b0;
      min_sm    <= '0;
      min_state <= '0;
    end else begin
      done <= 1'b0;
      if (first) n_q <= '0;
      if (wr_valid) begin
        n_q      <= n_q + 1'b1;      // wraps after 16
        run_sm_q <= cur_sm;
        run_st_q <= cur_st;
        if (n_q == 4'd15) begin
          done      <= 1'b1;
          min_sm    <= cur_sm;
          min_state <= cur_st;
        end
      end
    end
  end
endmodule
