// bps: Branch Point Selector. The SSM delivers the decoded checked bits
// (x2, x1) of each 4D symbol; the BPS runs them through a copy of the
// convolutional encoder to recover the subset label (z2 z1 z0) and uses it
// to pick, among the 8 branch points the BMC found for that symbol, the
// uncoded bits (z5 z4 z3) = (x5 x4 x3). The branch points are kept in a
// 64-entry circular memory, written at cycle 1 of every iteration and read
// DELAY iterations later: the decoded bits arrive 33 iterations after the
// symbol and the re-encoding stage adds one, for the 34 symbol periods of
// the document. out_x = {x5, x4, x3, x2, x1} is pulsed on out_valid.
module bps
  import hst_pkg::*;
#(
  parameter int DELAY = 34
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] cyc,
  input  logic       busy,
  input  logic [5:0] iter,
  input  logic [2:0] bp [8],
  input  logic       dec_valid,
  input  logic [1:0] dec_x,
  output logic       out_valid,
  output logic [4:0] out_x
);
  logic [23:0] bp_mem [64];
  logic [23:0] bp_word, rd_word;
  state_t      enc_q;
  subset_t     sub_q;
  logic [1:0]  x_q;
  logic        pend_q;
  logic        at_c1;
  logic [5:0]  raddr;

  always_comb
    for (int s = 0; s < 8; s++) bp_word[3*s +: 3] = bp[s];

  assign at_c1 = busy && cyc == 5'd1;
  assign raddr = iter - 6'(DELAY);
  assign rd_word = bp_mem[raddr];

  always_ff @(posedge clk)
    if (at_c1) bp_mem[iter] <= bp_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_q     <= '0;
      sub_q     <= '0;
      x_q       <= '0;
      pend_q    <= 1'b0;
      out_valid <= 1'b0;
      out_x     <= '0;
    end else begin
      out_valid <= 1'b0;
      // stage 2: one iteration later, select the delayed branch point
      if (at_c1 && pend_q) begin
        pend_q    <= 1'b0;
        out_valid <= 1'b1;
        out_x     <= {rd_word[3*sub_q +: 3], x_q};
      end
      // stage 1: re-encode the decoded bits
      if (dec_valid) begin
        sub_q  <= branch_subset(enc_q, dec_x[1], dec_x[0]);
        x_q    <= dec_x;
        enc_q  <= next_state(enc_q, dec_x[1], dec_x[0]);
        pend_q <= 1'b1;
      end
    end
  end
endmodule
