// bmc: Branch Metric Calculator. For a received 4D point, given as two
// 7-bit quantised phases, it finds for each of the 8 sets of parallel paths
// (subset label z2 z1 z0) the closest of its 8 parallel paths - the branch
// point bp = (z5 z4 z3) - and that path's 4-bit branch metric bm (0 =
// closest, 15 = furthest). The original unit is a look-up table held in
// ROMs addressed by the 14 phase bits; here the same table is computed by
// logic. The metric (this design's choice of table contents) is the sum over
// both 2D symbols of the squared phase error in 1/128-turn units, shifted
// right by BM_SHIFT and saturated to 4 bits. Ties keep the lowest bp.
// Path phases in units of 45 degrees: y1 = (z5 z3 z1), y2 = y1 + (z4 z2 z0).
// Purely combinational; the decoder registers the phases in front of it.
module bmc
  import hst_pkg::*;
#(
  parameter int BM_SHIFT = 5
) (
  input  logic [6:0] ph1,
  input  logic [6:0] ph2,
  output logic [3:0] bm [8],
  output logic [2:0] bp [8]
);
  // squared distance of a 7-bit phase from 8PSK point p
  function automatic logic [12:0] sqerr(logic [6:0] ph, logic [2:0] p);
    logic [6:0] d;
    logic [6:0] a;
    d = ph - {p, 4'b0000};
    a = d[6] ? 7'(-d) : d;   // 0..64
    return 13'(a) * 13'(a);
  endfunction

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      logic [13:0] best, m;
      logic [2:0]  best_u;
      logic [2:0]  y1, y2;
      logic [2:0]  sub, u;
      logic [13:0] scaled;
      sub    = 3'(s);
      best   = '1;
      best_u = '0;
      for (int k = 0; k < 8; k++) begin
        u  = 3'(k);                       // z5 z4 z3
        y1 = {u[2], u[0], sub[1]};
        y2 = y1 + {u[1], sub[2], sub[0]};
        m  = 14'(sqerr(ph1, y1)) + 14'(sqerr(ph2, y2));
        if (m < best) begin
          best   = m;
          best_u = u;
        end
      end
      scaled = best >> BM_SHIFT;
      bm[s]  = (scaled > 14'd15) ? 4'd15 : scaled[3:0];
      bp[s]  = best_u;
    end
  end
endmodule
