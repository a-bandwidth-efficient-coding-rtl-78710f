// sss: Signal Set Synchronisor. A 4D point is made of two 2D symbols, so the
// decoder can pair the received symbols in two ways; only one is right.
// When the pairing is wrong the minimum state metric grows quickly. The SSS
// measures that growth as the increase of the minimum metric over the last
// RATE_SPAN iterations (modulo 2^8) and compares it with the threshold:
//   MONITOR  rate > threshold            -> ARMED ("arm symbol toggle")
//   ARMED    rate > threshold within the next V iterations
//                                         -> toggle the 2D symbol delay,
//                                            HOLD for HOLD_BASE+V iterations
//            V iterations without that    -> MONITOR (disarm)
//   HOLD     ignores the decoder while it settles, then MONITOR
// The state machine follows the document; the rate measure over
// RATE_SPAN = 8 iterations is this design's choice (8 x 15 fits the 7-bit
// threshold). With auto_en low the delay follows manual_sel instead.
// leds light one of two lamps for delay 0 / delay 1. exceeded pulses with
// every rate above threshold.
module sss #(
  parameter int RATE_SPAN = 8,
  parameter int HOLD_BASE = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       min_valid,
  input  logic [7:0] min_sm,
  input  logic [6:0] threshold,
  input  logic [6:0] span,
  input  logic       auto_en,
  input  logic       manual_sel,
  output logic       delay_sel,
  output logic [1:0] leds,
  output logic       exceeded
);
  typedef enum logic [1:0] {MONITOR, ARMED, HOLD} sss_state_e;

  sss_state_e  st_q;
  logic [7:0]  hist_q [RATE_SPAN];
  logic [$clog2(RATE_SPAN+1)-1:0] nhist_q;
  logic [8:0]  cnt_q;
  logic        auto_sel_q;
  logic [7:0]  rate;
  logic        over;

  assign rate     = min_sm - hist_q[RATE_SPAN-1];
  assign over     = min_valid && (int'(nhist_q) == RATE_SPAN) && (rate > {1'b0, threshold});
  assign exceeded = over;
  assign delay_sel = auto_en ? auto_sel_q : manual_sel;
  assign leds      = delay_sel ? 2'b10 : 2'b01;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= MONITOR;
      nhist_q    <= '0;
      cnt_q      <= '0;
      auto_sel_q <= 1'b0;
      for (int i = 0; i < RATE_SPAN; i++) hist_q[i] <= '0;
    end else if (min_valid) begin
      hist_q[0] <= min_sm;
      for (int i = 1; i < RATE_SPAN; i++) hist_q[i] <= hist_q[i-1];
      if (int'(nhist_q) < RATE_SPAN) nhist_q <= nhist_q + 1'b1;
      case (st_q)
        MONITOR: if (over && auto_en) begin
          st_q  <= ARMED;
          cnt_q <= '0;
        end
        ARMED: begin
          if (cnt_q >= {2'b00, span}) st_q <= MONITOR;   // disarm
          else begin
            cnt_q <= cnt_q + 1'b1;
            if (over) begin
              auto_sel_q <= !auto_sel_q;
              st_q       <= HOLD;
              cnt_q      <= 9'(HOLD_BASE) + {2'b00, span};
              nhist_q    <= '0;
            end
          end
        end
        default: begin
          if (cnt_q <= 9'd1) st_q <= MONITOR;
          else               cnt_q <= cnt_q - 1'b1;
          nhist_q <= '0;
        end
      endcase
    end
  end
endmodule
