// conv_encoder: 16-state rate 2/3 non-systematic convolutional encoder of the
// two checked bits, followed by the uncoded bits (equations (1a)-(1c)):
//   z2 = x2 + (D^2 + 1) x1,  z1 = D^2 x2 + (D^2 + D + 1) x1,  z0 = D x2,
//   z5..z3 = x5..x3 (three uncoded bits: 8 parallel paths per branch).
// Two 2-stage shift registers hold x2 and x1; z is combinational from x and
// the state, and the state advances on en. The encoding of the state
// register follows hst_pkg.
module conv_encoder
  import hst_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [4:0] x,
  output logic [5:0] z,
  output state_t     state
);
  state_t s_q;

  assign z     = {x[4:2], branch_subset(s_q, x[1], x[0])};
  assign state = s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_q <= '0;
    else if (en) s_q <= next_state(s_q, x[1], x[0]);
  end
endmodule
