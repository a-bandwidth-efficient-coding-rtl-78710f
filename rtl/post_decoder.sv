// post_decoder: output stage of the decoder. Each decoded word
// {x5, x4, x3, x2, x1} is differentially decoded - (w5, w3, w1) =
// (x5, x3, x1) minus the previous (x5, x3, x1), modulo 8, the inverse of the
// encoder's precoder - unless diff_en (the postdecoder switch) is off.
// The result is given as a 5-bit byte with a byte clock and, through a
// parallel-to-serial converter, as a bit stream w1 first with a bit clock
// at five times the byte rate (made by rate_mult in place of a PLL). Both
// data outputs change on the rising edge of their clock.
module post_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [4:0] in_x,
  input  logic       diff_en,
  output logic [4:0] rx_data_parallel,
  output logic       rx_clk_parallel,
  output logic       rx_data_serial,
  output logic       rx_clk_serial
);
  logic [2:0] prev_q, diff;
  logic [4:0] w;
  logic [4:0] sh_q;
  logic       slot;
  logic [2:0] idx;
  logic       half;

  assign diff = {in_x[4], in_x[2], in_x[0]} - prev_q;
  assign w    = diff_en ? {diff[2], in_x[3], diff[1], in_x[1], diff[0]} : in_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q           <= '0;
      rx_data_parallel <= '0;
      sh_q             <= '0;
      rx_data_serial   <= 1'b0;
    end else begin
      if (in_valid) begin
        prev_q           <= {in_x[4], in_x[2], in_x[0]};
        rx_data_parallel <= w;
      end
      if (slot) begin
        if (idx == 3'd0) begin
          rx_data_serial <= w[0];
          sh_q           <= {1'b0, w[4:1]};
        end else begin
          rx_data_serial <= sh_q[0];
          sh_q           <= {1'b0, sh_q[4:1]};
        end
      end
    end
  end

  rate_mult #(.N(5)) u_x5 (
    .clk, .rst_n, .tick(in_valid), .slot(slot), .idx(idx), .clk_out(rx_clk_serial)
  );

  rate_mult #(.N(1)) u_x1 (
    .clk, .rst_n, .tick(in_valid), .slot(), .idx(), .clk_out(half)
  );
  assign rx_clk_parallel = half;
endmodule
