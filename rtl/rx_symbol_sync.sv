// rx_symbol_sync: input stage of the decoder. The received 2D symbol clock
// rx_sym_clk is asynchronous to the 10 MHz decoder clock; it passes a
// two-flop synchroniser and each 2D phase is captured on its falling edge
// (received data change on the rising edge). A toggle flop counts 2D
// symbols and so forms DATCLK, the 2D clock divided by two. At each DATCLK
// period one 4D point is handed to the decoder with a start pulse: the last
// two 2D symbols (delay_sel = 0) or the two before the latest one
// (delay_sel = 1, a delay of one 2D symbol). Switching delay_sel moves the
// 4D framing by one 2D symbol; this is how the signal set synchroniser
// aligns the decoder to the transmitted pairs.
module rx_symbol_sync (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_sym_clk,
  input  logic [6:0] phase,
  input  logic       delay_sel,
  output logic       start,
  output logic [6:0] ph1,
  output logic [6:0] ph2,
  output logic       datclk
);
  logic [2:0] sync_q;
  logic       fall;
  logic [6:0] s0_q, s1_q, s2_q;   // newest, previous, one before
  logic       cap_q;
  logic       half_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], rx_sym_clk};
  end
  assign fall = sync_q[2] && !sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q   <= '0;
      s1_q   <= '0;
      s2_q   <= '0;
      cap_q  <= 1'b0;
      half_q <= 1'b0;
      start  <= 1'b0;
      ph1    <= '0;
      ph2    <= '0;
    end else begin
      cap_q <= fall;
      start <= 1'b0;
      if (fall) begin
        s0_q <= phase;
        s1_q <= s0_q;
        s2_q <= s1_q;
      end
      if (cap_q) begin
        half_q <= !half_q;
        if (half_q) begin
          start <= 1'b1;
          ph1   <= delay_sel ? s2_q : s1_q;
          ph2   <= delay_sel ? s1_q : s0_q;
        end
      end
    end
  end

  assign datclk = half_q;
endmodule
