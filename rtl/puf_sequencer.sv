// puf_sequencer: measurement controller of the RO-PUF.
//
// A pulse on start runs 2^M measurements back to back. Each one clears the
// ring counters (a one-cycle cnt_clr pulse, rings stopped; its rising edge
// is the counters' asynchronous clear), enables all
// rings together for GATE_CYCLES system clocks (ro_en high: the counting
// window, 20 ms at the assumed 100 MHz clock), waits SETTLE_CYCLES for the
// last ring edges to die out, then raises sample for one cycle while the
// counts are static. last is high together with the final sample. busy is
// high from the cycle after start until the cycle after the last sample.
// ro_en and cnt_clr come straight from flip-flops so the asynchronous
// counter clear and the ring enables see no glitches. The 20 ms window and
// the 2^M samples follow the source; the settle time and the clock rate are
// this design's choices.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertions' disable condition.
module puf_sequencer #(
  parameter int GATE_CYCLES   = 2_000_000,
  parameter int SETTLE_CYCLES = 4,
  parameter int M             = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic ro_en,
  output logic cnt_clr,
  output logic sample,
  output logic last
);

  localparam int TW = $clog2(GATE_CYCLES + SETTLE_CYCLES + 1);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_GATE, S_SETTLE, S_SAMPLE} state_t;

  state_t        state, state_n;
  logic [TW-1:0] timer;
  logic [M:0]    n_done;     // samples taken so far

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:   if (start) state_n = S_CLEAR;
      S_CLEAR:  state_n = S_GATE;
      S_GATE:   if (timer == TW'(GATE_CYCLES - 1)) state_n = S_SETTLE;
      S_SETTLE: if (timer == TW'(SETTLE_CYCLES - 1)) state_n = S_SAMPLE;
      S_SAMPLE: state_n = (n_done == (M+1)'((1 << M) - 1)) ? S_IDLE : S_CLEAR;
      default:  state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      timer   <= '0;
      n_done  <= '0;
      ro_en   <= 1'b0;
      cnt_clr <= 1'b0;
      sample  <= 1'b0;
      last    <= 1'b0;
    end else begin
      state   <= state_n;
      timer   <= (state_n != state) ? '0 : timer + 1'b1;
      ro_en   <= (state_n == S_GATE);
      cnt_clr <= (state_n == S_CLEAR);
      sample  <= (state_n == S_SAMPLE);
      last    <= (state_n == S_SAMPLE) && (n_done == (M+1)'((1 << M) - 1));
      if (state == S_IDLE && start) n_done <= '0;
      else if (state == S_SAMPLE)   n_done <= n_done + 1'b1;
    end
  end

  assign busy = (state != S_IDLE);

  a_en_not_with_clr: assert property (@(posedge clk) disable iff (!rst_n) !(ro_en && cnt_clr))
    else $error("puf_sequencer: rings enabled while counters cleared");

endmodule
