// rx_formatter: front end of the decoder that turns the 10-bit receive input
// into one 7-bit quantised phase per 2D symbol (128 sectors per turn,
// sector 16*p is the 8PSK point p). The operation switch selects:
//   OP_HARD     3-bit hard-decision phase in rx_in[2:0]
//   OP_SOFT     7-bit phase in rx_in[6:0]
//   OP_IQ       5-bit I in rx_in[9:5] and 5-bit Q in rx_in[4:0], in one of
//               four number formats (iq_type); the point is converted to
//               the nearest phase sector ("pie-chart" quantisation)
//   OP_LOOPBACK the encoder's own 3-bit symbol
// The I/Q conversion folds the point into the first octant and counts the
// sector boundaries below it: |Q|*256 > |I|*T[k] with
// T[k] = round(256*tan((k+1/2)*pi/64)), k = 0..15; then unfolds the octant
// and quadrant. "Reverse binary" is taken as inverted offset binary.
// Purely combinational.
module rx_formatter
  import hst_pkg::*;
(
  input  op_mode_e   operation,
  input  iq_fmt_e    iq_type,
  input  logic [9:0] rx_in,
  input  logic [2:0] loop_sym,
  output logic [6:0] phase
);
  localparam int unsigned TAN_T [16] = '{6, 19, 32, 44, 57, 71, 85, 99,
                                         113, 129, 145, 162, 180, 200, 221, 244};

  function automatic logic signed [5:0] to_signed(logic [4:0] v, iq_fmt_e f);
    case (f)
      IQ_TWOS:     return 6'(signed'(v));
      IQ_SIGNMAG:  return v[4] ? -$signed({2'b00, v[3:0]}) : $signed({2'b00, v[3:0]});
      IQ_REVBIN:   return 6'sd15 - $signed({1'b0, v});
      default:     return $signed({1'b0, v}) - 6'sd16;
    endcase
  endfunction

  logic signed [5:0] i_s, q_s;
  logic [4:0]        ai, aq, lo, hi;
  logic [4:0]        oct;       // 0..16 sectors within the octant
  logic [5:0]        quad;      // 0..32 sectors within the quadrant
  logic [6:0]        iq_phase;

  always_comb begin
    i_s = to_signed(rx_in[9:5], iq_type);
    q_s = to_signed(rx_in[4:0], iq_type);
    ai  = 5'(i_s[5] ? -i_s : i_s);
    aq  = 5'(q_s[5] ? -q_s : q_s);
    lo  = (aq > ai) ? ai : aq;
    hi  = (aq > ai) ? aq : ai;
    oct = '0;
    for (int k = 0; k < 16; k++)
      if (32'(lo) * 256 > 32'(hi) * TAN_T[k]) oct = oct + 1'b1;
    quad = (aq > ai) ? 6'(6'd32 - 6'(oct)) : 6'(oct);
    if (ai == 0 && aq == 0)  iq_phase = '0;
    else if (!i_s[5] && !q_s[5]) iq_phase = 7'(quad);
    else if ( i_s[5] && !q_s[5]) iq_phase = 7'(7'd64 - 7'(quad));
    else if ( i_s[5] &&  q_s[5]) iq_phase = 7'(7'd64 + 7'(quad));
    else                         iq_phase = 7'(8'd128 - 8'(quad));
  end

  always_comb begin
    case (operation)
      OP_HARD:     phase = {rx_in[2:0], 4'b0000};
      OP_SOFT:     phase = rx_in[6:0];
      OP_IQ:       phase = iq_phase;
      default:     phase = {loop_sym, 4'b0000};
    endcase
  end
endmodule
