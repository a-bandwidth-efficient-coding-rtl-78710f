// hst_codec: the complete codec for the 16-state, rate 5/6, 2.5 bit/symbol
// 4D-8PSK trellis code: the encoder and the serial Viterbi decoder side by
// side, with the internal loop-back connection from the encoder's symbol
// output to the decoder's input (used when operation = OP_LOOPBACK).
// Both halves run from the one system clock clk (10 MHz for the document's
// speed); all data clocks (tx_clk, rx_sym_clk) are asynchronous inputs that
// are sampled. The port list is that of the codec's interface diagram.
// overrun reports a received 4D point that came before the decoder had
// finished the previous one (symbol rate above clk/23).
module hst_codec
  import hst_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // encoder
  input  logic [4:0] tx_data_parallel,
  input  logic       tx_data_serial,
  input  logic       tx_clk,
  input  logic       tx_serial_mode,
  input  logic       tx_diff_en,
  output logic [2:0] tx_sym,
  output logic       tx_sym_clk,
  // decoder
  input  logic [9:0] rx_in,
  input  logic       rx_sym_clk,
  input  logic       auto_synch,
  input  logic       manual_synch,
  input  logic       sm_reset,
  input  logic       diff_dec_en,
  input  logic [6:0] synch_threshold,
  input  logic [6:0] synch_span,
  input  op_mode_e   operation,
  input  iq_fmt_e    iq_type,
  output logic [4:0] rx_data_parallel,
  output logic       rx_clk_parallel,
  output logic       rx_data_serial,
  output logic       rx_clk_serial,
  output logic       rx_error,
  output logic [1:0] synch_state,
  output logic       overrun
);
  logic dec_sym_clk;

  tx_encoder u_enc (
    .clk, .rst_n, .tx_clk, .tx_data_parallel, .tx_data_serial,
    .serial_mode(tx_serial_mode), .diff_en(tx_diff_en), .tx_sym, .tx_sym_clk
  );

  assign dec_sym_clk = (operation == OP_LOOPBACK) ? tx_sym_clk : rx_sym_clk;

  viterbi_decoder u_dec (
    .clk, .rst_n, .rx_in, .rx_sym_clk(dec_sym_clk), .loop_sym(tx_sym),
    .operation, .iq_type, .auto_synch, .manual_synch, .sm_reset, .diff_dec_en,
    .synch_threshold, .synch_span, .rx_data_parallel, .rx_clk_parallel,
    .rx_data_serial, .rx_clk_serial, .rx_error, .synch_state, .overrun
  );
endmodule
