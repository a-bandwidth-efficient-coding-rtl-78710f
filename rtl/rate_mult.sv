// rate_mult: digital clock multiplier standing in for the 74HC4046 PLLs of
// the codec (2x symbol clock in the encoder, 5x bit clock in the decoder).
// It counts system clocks between successive input ticks, divides that
// period by N and, from each tick on, emits N slot pulses spaced one
// N-th of the last measured period apart. clk_out is high for the first half
// of every slot (at least one cycle), so data updated on a slot pulse changes on the rising edge
// of clk_out. slot is combinational and coincides with tick for slot 0.
// The spacing follows the previous interval, so like a PLL the block needs a
// steady tick rate: the first interval after reset uses a spacing of two
// cycles, and after a pause the slots of the first word are spread over the
// pause length (a tick that comes earlier cuts them short).
module rate_mult #(
  parameter int N     = 2,
  parameter int CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  output logic                 slot,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] idx,
  output logic                 clk_out
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [CNT_W-1:0] cnt_q, period_q, scnt_q, ival, half;
  logic [IW-1:0]    idx_q;
  logic             run_q;
  logic             seen_q;     // a tick has been seen since reset
  logic             next_slot;

  always_comb begin
    ival = period_q / CNT_W'(N);
    if (ival == '0) ival = CNT_W'(1);
    half = ival >> 1;
    if (half == '0) half = CNT_W'(1);
  end

  assign next_slot = run_q && (scnt_q == ival - 1'b1) && (int'(idx_q) < N - 1);
  assign slot      = tick || next_slot;
  assign idx       = tick ? '0 : (next_slot ? idx_q + 1'b1 : idx_q);
  assign clk_out   = run_q && (scnt_q < half);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      period_q <= '0;
      scnt_q   <= '0;
      idx_q    <= '0;
      run_q    <= 1'b0;
      seen_q   <= 1'b0;
    end else if (tick) begin
      period_q <= seen_q ? cnt_q + 1'b1 : CNT_W'(2 * N);
      seen_q   <= 1'b1;
      cnt_q    <= '0;
      scnt_q   <= '0;
      idx_q    <= '0;
      run_q    <= 1'b1;
    end else begin
      if (cnt_q != '1) cnt_q <= cnt_q + 1'b1;
      if (next_slot) begin
        scnt_q <= '0;
        idx_q  <= idx_q + 1'b1;
      end else if (run_q) begin
        if (scnt_q == ival - 1'b1) run_q <= 1'b0;  // last slot finished
        else                       scnt_q <= scnt_q + 1'b1;
      end
    end
  end
endmodule
