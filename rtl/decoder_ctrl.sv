// decoder_ctrl: sequencer of the serial Viterbi decoder. Each received 4D
// point starts one iteration of 23 clock cycles: cycle 0 is the start cycle,
// cycles 1-16 read old state metrics, the ACS pipeline writes new metrics in
// cycles 7-22. cyc counts 0..22 while busy and first marks cycle 0. After
// cycle 22 the sequencer stops and waits for the next start, so the decoder
// follows any symbol rate up to clock/23. A start arriving during an
// iteration cannot be served: it is dropped and flagged on overrun (this
// design's choice). iter counts finished iterations, modulo 64.
module decoder_ctrl #(
  parameter int CYCLES = 23
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       first,
  output logic [4:0] cyc,
  output logic       busy,
  output logic [5:0] iter,
  output logic       overrun
);
  logic       run_q;
  logic [4:0] cnt_q;

  assign first   = start && !run_q;
  assign busy    = run_q || first;
  assign cyc     = run_q ? cnt_q : 5'd0;
  assign overrun = start && run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      cnt_q <= '0;
      iter  <= '0;
    end else if (first) begin
      run_q <= 1'b1;
      cnt_q <= 5'd1;
    end else if (run_q) begin
      if (cnt_q == 5'(CYCLES - 1)) begin
        run_q <= 1'b0;
        cnt_q <= '0;
        iter  <= iter + 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end
endmodule
