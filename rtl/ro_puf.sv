// ro_puf: the ring-oscillator PUF with on-chip averaging.
//
// N_RO ring oscillators (NAND plus N_INV inverters each) share one enable;
// each drives its own CNT_W-bit edge counter. puf_sequencer opens a counting
// window of GATE_CYCLES system clocks 2^M times; after each window the
// subtractor array forms the N_RO-1 differences of successive counters and
// df_averager adds them up. The result, df_avg, is the mean differential
// count of each ring pair over the 2^M windows, which has far less noise in
// its low bits than a single measurement.
// Interface: start (one cycle) begins a run; busy stays high while it runs;
// sample_valid/df_sample show each raw difference vector; df_valid pulses
// one cycle with the averages on df_avg (held until the next run).
// Timing: a run takes 2^M x (GATE_CYCLES + SETTLE_CYCLES + 2) cycles, about
// 20.5 s with the defaults. DIE_SEED and PLACE_SEED only select the
// behavioural ring model's process offsets (which chip, which placement);
// they have no hardware meaning, and neither has RO_OP_VAR_PS, the model's
// window-to-window drift of the ring half period. The block structure (rings, counters,
// subtractors, averaging) follows the source.
// Lint reports rst_n and cnt_clr as used both synchronously and
// asynchronously: cnt_clr is the counters' asynchronous clear by design, and
// the synchronous uses are only assertions (disable condition, sequencer
// check that the clear and the enable never overlap).
module ro_puf #(
  parameter int          N_RO          = 32,
  parameter int          N_INV         = 16,
  parameter int          CNT_W         = 24,
  parameter int          GATE_CYCLES   = 2_000_000,
  parameter int          SETTLE_CYCLES = 4,
  parameter int          M             = 10,
  parameter int unsigned DIE_SEED      = 1,
  parameter int unsigned PLACE_SEED    = 1,
  parameter int          RO_OP_VAR_PS  = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    sample_valid,
  output logic signed [CNT_W-1:0] df_sample [N_RO-1],
  output logic                    df_valid,
  output logic signed [CNT_W-1:0] df_avg [N_RO-1]
);

  logic             ro_en, cnt_clr, last;
  logic [N_RO-1:0]  ro_out;
  logic [CNT_W-1:0] count [N_RO];

  puf_sequencer #(
    .GATE_CYCLES  (GATE_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES),
    .M            (M)
  ) u_seq (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .busy   (busy),
    .ro_en  (ro_en),
    .cnt_clr(cnt_clr),
    .sample (sample_valid),
    .last   (last)
  );

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_oscillator #(
      .N_INV     (N_INV),
      .DIE_SEED  (DIE_SEED),
      .PLACE_SEED(PLACE_SEED),
      .OP_VAR_PS (RO_OP_VAR_PS),
      .RO_INDEX  (i)
    ) u_ro (
      .en    (ro_en),
      .ro_out(ro_out[i])
    );

    ro_counter #(.CNT_W(CNT_W)) u_cnt (
      .ro_clk(ro_out[i]),
      .clr   (cnt_clr),
      .count (count[i])
    );
  end

  diff_subtractor #(.N_RO(N_RO), .CNT_W(CNT_W)) u_sub (
    .count(count),
    .df   (df_sample)
  );

  df_averager #(.N_DF(N_RO - 1), .DF_W(CNT_W), .M(M)) u_avg (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start && !busy),
    .in_valid (sample_valid),
    .df_in    (df_sample),
    .out_valid(df_valid),
    .df_avg   (df_avg)
  );

  a_result_after_last: assert property (@(posedge clk) disable iff (!rst_n) last |=> df_valid)
    else $error("ro_puf: no average after the last sample");

endmodule
