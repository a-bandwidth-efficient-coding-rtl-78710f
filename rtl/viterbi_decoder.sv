// viterbi_decoder: serial Viterbi decoder for the 16-state, rate 5/6,
// 2.5 bit/symbol 4D-8PSK trellis code. One shared add-compare-select unit
// visits the 16 states in turn, so each received 4D point takes one
// iteration of 23 cycles of the decoder clock (1 start cycle, 4 pipeline
// fill reads, 2 ACS stages, 16 writes): at 10 MHz up to 434,000 4D
// points/s, 2.17 Mbit/s of user data.
// Data path (Fig. 2 of the scheme): received samples -> rx_formatter (7-bit
// phase) -> rx_symbol_sync (pairs 2D symbols, 0/1 symbol delay from the
// SSS) -> BMC (branch metrics and branch points of the 8 subsets) -> SMC
// (state metrics, path decisions) -> MSMS (best state, minimum metric) ->
// SSM (traceback, decoded x2 x1) -> BPS (re-encode, pick x5 x4 x3) ->
// post_decoder (differential decoding, byte and serial outputs).
// The minimum metric also feeds the SSS, which steers the symbol pairing.
// The decoded byte of a 4D point appears 34 iterations after the point.
module viterbi_decoder
  import hst_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] rx_in,
  input  logic       rx_sym_clk,
  input  logic [2:0] loop_sym,
  input  op_mode_e   operation,
  input  iq_fmt_e    iq_type,
  input  logic       auto_synch,
  input  logic       manual_synch,
  input  logic       sm_reset,
  input  logic       diff_dec_en,
  input  logic [6:0] synch_threshold,
  input  logic [6:0] synch_span,
  output logic [4:0] rx_data_parallel,
  output logic       rx_clk_parallel,
  output logic       rx_data_serial,
  output logic       rx_clk_serial,
  output logic       rx_error,
  output logic [1:0] synch_state,
  output logic       overrun
);
  logic [6:0] phase, ph1, ph2;
  logic       start, datclk, delay_sel;
  logic       first, busy;
  logic [4:0] cyc;
  logic [5:0] iter;
  logic [3:0] bm [8];
  logic [2:0] bp [8];
  logic       wr_valid;
  state_t     wr_state;
  logic [7:0] wr_sm;
  pd_t        wr_pd;
  logic       min_done;
  logic [7:0] min_sm;
  state_t     min_state;
  logic       dec_valid;
  logic [1:0] dec_x;
  logic       out_valid;
  logic [4:0] out_x;

  rx_formatter u_fmt (
    .operation, .iq_type, .rx_in, .loop_sym, .phase(phase)
  );

  rx_symbol_sync u_sync (
    .clk, .rst_n, .rx_sym_clk, .phase(phase), .delay_sel(delay_sel),
    .start(start), .ph1(ph1), .ph2(ph2), .datclk(datclk)
  );

  decoder_ctrl u_ctrl (
    .clk, .rst_n, .start(start), .first(first), .cyc(cyc), .busy(busy),
    .iter(iter), .overrun(overrun)
  );

  // the received point is held for the whole iteration
  logic [6:0] ph1_q, ph2_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph1_q <= '0;
      ph2_q <= '0;
    end else if (first) begin
      ph1_q <= ph1;
      ph2_q <= ph2;
    end
  end

  bmc u_bmc (.ph1(ph1_q), .ph2(ph2_q), .bm(bm), .bp(bp));

  smc u_smc (
    .clk, .rst_n, .clr(sm_reset), .cyc(cyc), .busy(busy), .bm(bm),
    .wr_valid(wr_valid), .wr_state(wr_state), .wr_sm(wr_sm), .wr_pd(wr_pd)
  );

  msms u_msms (
    .clk, .rst_n, .first(first), .wr_valid(wr_valid), .wr_state(wr_state), .wr_sm(wr_sm),
    .done(min_done), .min_sm(min_sm), .min_state(min_state)
  );

  ssm u_ssm (
    .clk, .rst_n, .first(first), .cyc(cyc), .busy(busy), .iter(iter[4:0]),
    .wr_valid(wr_valid), .wr_state(wr_state), .wr_pd(wr_pd),
    .best_state(min_state), .dec_valid(dec_valid), .dec_x(dec_x)
  );

  bps u_bps (
    .clk, .rst_n, .cyc(cyc), .busy(busy), .iter(iter), .bp(bp),
    .dec_valid(dec_valid), .dec_x(dec_x), .out_valid(out_valid), .out_x(out_x)
  );

  post_decoder u_post (
    .clk, .rst_n, .in_valid(out_valid), .in_x(out_x), .diff_en(diff_dec_en),
    .rx_data_parallel, .rx_clk_parallel, .rx_data_serial, .rx_clk_serial
  );

  sss u_sss (
    .clk, .rst_n, .min_valid(min_done), .min_sm(min_sm), .threshold(synch_threshold),
    .span(synch_span), .auto_en(auto_synch), .manual_sel(manual_synch),
    .delay_sel(delay_sel), .leds(synch_state), .exceeded(rx_error)
  );

  logic unused;
  assign unused = datclk;
endmodule
