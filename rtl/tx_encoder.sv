// tx_encoder: the encoder unit of the codec. Data arrive either as 5-bit
// bytes (one per tx_clk period) or bit-serially (w1 first, five tx_clk
// periods per byte). tx_clk is asynchronous: it is brought into the system
// clock domain by a two-flop synchroniser and the data are sampled at its
// falling edge, half a period after they change. Each byte w5..w1 goes
// through the optional differential precoder, the non-systematic
// convolutional encoder and the 4D-8PSK mapper; the two resulting 8PSK
// phases are sent one after the other, at twice the byte rate, on tx_sym
// with the symbol clock tx_sym_clk (data change on its rising edge).
// The doubled clock comes from rate_mult instead of an analog PLL.
module tx_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_clk,
  input  logic [4:0] tx_data_parallel,
  input  logic       tx_data_serial,
  input  logic       serial_mode,
  input  logic       diff_en,
  output logic [2:0] tx_sym,
  output logic       tx_sym_clk
);
  logic [2:0] clk_sync_q;
  logic       fall;
  logic [4:0] sh_q;
  logic [2:0] bitcnt_q;
  logic       word_q;
  logic [4:0] word_data_q;
  logic [4:0] x;
  logic [5:0] z;
  logic [2:0] y1, y2, y2_q;
  logic       slot;
  logic       idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk_sync_q <= '0;
    else        clk_sync_q <= {clk_sync_q[1:0], tx_clk};
  end
  assign fall = clk_sync_q[2] && !clk_sync_q[1];

  // byte assembly
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q        <= '0;
      bitcnt_q    <= '0;
      word_q      <= 1'b0;
      word_data_q <= '0;
    end else begin
      word_q <= 1'b0;
      if (fall) begin
        if (!serial_mode) begin
          word_data_q <= tx_data_parallel;
          word_q      <= 1'b1;
          bitcnt_q    <= '0;
        end else begin
          sh_q <= {tx_data_serial, sh_q[4:1]};
          if (bitcnt_q == 3'd4) begin
            bitcnt_q    <= '0;
            word_data_q <= {tx_data_serial, sh_q[4:1]};
            word_q      <= 1'b1;
          end else begin
            bitcnt_q <= bitcnt_q + 1'b1;
          end
        end
      end
    end
  end

  diff_encoder u_diff (
    .clk, .rst_n, .en(word_q), .bypass(!diff_en), .w(word_data_q), .x(x)
  );

  conv_encoder u_conv (
    .clk, .rst_n, .en(word_q), .x(x), .z(z), .state()
  );

  signal_mapper u_map (.z(z), .y1(y1), .y2(y2));

  rate_mult #(.N(2)) u_x2 (
    .clk, .rst_n, .tick(word_q), .slot(slot), .idx(idx), .clk_out(tx_sym_clk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sym <= '0;
      y2_q   <= '0;
    end else if (slot) begin
      if (!idx) begin
        tx_sym <= y1;
        y2_q   <= y2;
      end else begin
        tx_sym <= y2_q;
      end
    end
  end
endmodule
