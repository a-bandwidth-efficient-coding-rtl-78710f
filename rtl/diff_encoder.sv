// diff_encoder: mod-8 differential precoder of the encoder (Fig. 1 of the
// coding scheme). The three bits (w5,w3,w1) are added modulo 8 to the
// previous output (x5,x3,x1), held in three D elements; w4 and w2 pass
// straight through. A 45-degree carrier rotation adds 1 to (x5,x3,x1) for
// every symbol and so cancels in the matching differential decoder.
// Which w lines feed the adder is this design's reading of the figure.
// Interface: one 5-bit word w = {w5..w1} per en pulse; x is combinational
// from w and the stored previous sum; the sum is stored on en.
// With bypass set (precoder switched off) x = w and the register holds.
module diff_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       bypass,
  input  logic [4:0] w,
  output logic [4:0] x
);
  logic [2:0] prev_q;
  logic [2:0] sum;

  assign sum = {w[4], w[2], w[0]} + prev_q;

  always_comb begin
    if (bypass) x = w;
    else        x = {sum[2], w[3], sum[1], w[1], sum[0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            prev_q <= '0;
    else if (en && !bypass) prev_q <= sum;
  end
endmodule
