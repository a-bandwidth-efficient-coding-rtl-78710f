// ssm: Survivor Sequence Memory. It stores the 2-bit path decisions (PDs) of
// every iteration and traces back through them to deliver the decoded
// checked bits x2, x1 with a traceback depth of 28.
// Storage: four 64x4 memories. A word holds the PDs of two states (the pair
// that differs in state bit 1), so one iteration's 16 PDs fill 8 words,
// written on the even cycles 8..22 as the SMC produces them. The PD set of
// iteration t goes to memory (t/8) mod 4, slot t mod 8.
// Traceback: four tracebacks run at once, one per memory. On the odd cycles
// 9..21 each one does a step: it reads the PD of its current state and
// moves to the predecessor {s2, pd1, s0, pd0}. Traceback j covers PD sets
// 8j+1..8j+7 iterations old, which always lie in four different memories.
// At each iteration's first cycle the tracebacks move one place along:
// traceback 0 starts from the best state of the previous iteration (MSMS),
// and the state reached by traceback 3 after 28 steps gives the decoded bits
// {x2, x1} = {s3, s1}, pulsed on dec_valid one cycle later. dec_valid stays
// low until the pipeline holds only decisions of received symbols. Bits of the
// 4D symbol received in iteration m thus appear in iteration m+33.
// The memory layout and the cycle plan are this design's own; the depth,
// the four memories and their sizes follow the document.
module ssm
  import hst_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       first,
  input  logic [4:0] cyc,
  input  logic       busy,
  input  logic [4:0] iter,
  input  logic       wr_valid,
  input  state_t     wr_state,
  input  pd_t        wr_pd,
  input  state_t     best_state,
  output logic       dec_valid,
  output logic [1:0] dec_x
);
  localparam int BANKS = 4;
  localparam int SEG   = 7;
  localparam int LAT   = 33;    // iterations from reception to decoded bits

  logic [3:0] mem [BANKS][64];
  pd_t        pd_lo_q;
  state_t     tb_q [BANKS];
  logic [5:0] fill_q;          // iterations seen, saturating at LAT

  // PD write, two PDs per word ----------------------------------------------
  always_ff @(posedge clk) begin
    if (wr_valid) begin
      if (!wr_state[1]) pd_lo_q <= wr_pd;
      else mem[iter[4:3]][{iter[2:0], wr_state[3], wr_state[2], wr_state[0]}] <= {wr_pd, pd_lo_q};
    end
  end

  // traceback step ------------------------------------------------------
  logic       step;
  logic [2:0] s;
  assign step = busy && cyc >= 5'd9 && cyc <= 5'(9 + 2 * (SEG - 1)) && cyc[0];
  assign s    = 3'((cyc - 5'd9) >> 1);

  state_t    nxt [BANKS];
  logic [4:0] t   [BANKS];
  logic [3:0] word [BANKS];
  pd_t        pd  [BANKS];

  always_comb begin
    for (int j = 0; j < BANKS; j++) begin
      t[j]    = iter - 5'(8 * j + 1) - 5'(s);
      word[j] = mem[t[j][4:3]][{t[j][2:0], tb_q[j][3], tb_q[j][2], tb_q[j][0]}];
      pd[j]   = tb_q[j][1] ? word[j][3:2] : word[j][1:0];
      nxt[j]  = pred_state(tb_q[j], pd[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < BANKS; j++) tb_q[j] <= '0;
      fill_q    <= '0;
      dec_valid <= 1'b0;
      dec_x     <= '0;
    end else begin
      dec_valid <= 1'b0;
      if (first) begin
        tb_q[0]   <= best_state;
        for (int j = 1; j < BANKS; j++) tb_q[j] <= tb_q[j-1];
        if (fill_q != 6'(LAT)) fill_q <= fill_q + 1'b1;
        dec_valid <= (fill_q == 6'(LAT));
        dec_x     <= {tb_q[BANKS-1][3], tb_q[BANKS-1][1]};
      end else if (step) begin
        for (int j = 0; j < BANKS; j++) tb_q[j] <= nxt[j];
      end
    end
  end

endmodule
