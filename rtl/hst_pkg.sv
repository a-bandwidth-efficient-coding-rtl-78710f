// hst_pkg: types, constants and trellis functions shared by the encoder and
// the serial Viterbi decoder of the 16-state, rate 5/6, 2.5 bit/symbol
// 4D-8PSK trellis code.
//
// Trellis conventions used throughout the design (an own encoding; the code
// itself follows equations (1a)-(1c) of the non-systematic encoder):
//   encoder state  s = {x2[n-1], x2[n-2], x1[n-1], x1[n-2]}
//   next state        {x2[n],   x2[n-1], x1[n],   x1[n-1]}
//   z2 = x2 ^ x1 ^ x1[n-2]
//   z1 = x2[n-2] ^ x1 ^ x1[n-1] ^ x1[n-2]
//   z0 = x2[n-1]
// The four predecessors of a new state differ only in {x2[n-2], x1[n-2]},
// which is the 2-bit path decision (PD) stored by the survivor memory.
package hst_pkg;

  localparam int NSTATES     = 16;  // code states
  localparam int NSUBSETS    = 8;   // sets of parallel paths (z2 z1 z0)
  localparam int PH_W        = 7;   // 2D phase quantisation, bits
  localparam int BM_W        = 4;   // branch metric width
  localparam int CYCLES_ITER = 23;  // clock cycles per Viterbi iteration

  typedef logic [3:0] state_t;
  typedef logic [2:0] subset_t;
  typedef logic [1:0] pd_t;

  // Receive data source, selected by the "operation" switch.
  typedef enum logic [1:0] {
    OP_LOOPBACK = 2'd0,
    OP_IQ       = 2'd1,
    OP_HARD     = 2'd2,
    OP_SOFT     = 2'd3
  } op_mode_e;

  // Number format of the 5-bit I and Q samples.
  typedef enum logic [1:0] {
    IQ_TWOS     = 2'd0,
    IQ_SIGNMAG  = 2'd1,
    IQ_REVBIN   = 2'd2,
    IQ_STRAIGHT = 2'd3
  } iq_fmt_e;

  // Subset label (z2 z1 z0) of the branch from state s under inputs x2, x1.
  function automatic subset_t branch_subset(state_t s, logic x2, logic x1);
    logic z2, z1, z0;
    z2 = x2 ^ x1 ^ s[0];
    z1 = s[2] ^ x1 ^ s[1] ^ s[0];
    z0 = s[3];
    return {z2, z1, z0};
  endfunction

  function automatic state_t next_state(state_t s, logic x2, logic x1);
    return {x2, s[3], x1, s[1]};
  endfunction

  // Predecessor k (= PD {x2[n-2], x1[n-2]}) of new state ns.
  function automatic state_t pred_state(state_t ns, pd_t k);
    return {ns[2], k[1], ns[0], k[0]};
  endfunction

  // Modulo (two's complement) comparison of free-running state metrics.
  function automatic logic sm_less(logic [7:0] a, logic [7:0] b);
    logic [7:0] d;
    d = a - b;
    return d[7];
  endfunction

endpackage
