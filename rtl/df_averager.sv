// df_averager: averaging circuit of the RO-PUF.
//
// Accumulates 2^M differential-frequency vectors and divides the sums by
// 2^M by dropping their M low bits (an arithmetic shift, i.e. rounding
// towards minus infinity), so no divider is needed. Each of the N_DF
// accumulators is DF_W+M bits wide and cannot overflow. An internal counter
// tracks the samples: the first sample of a run replaces the sums, and the
// 2^M-th one produces the result. Interface: a one-cycle in_valid with
// df_in; out_valid pulses one cycle after the 2^M-th in_valid and df_avg
// holds the averages until the next result. clear restarts the count.
// Averaging over 2^M samples by cutting M bits follows the source; the
// registers (instead of LUT memory) are this design's choice.
module df_averager #(
  parameter int N_DF = 31,
  parameter int DF_W = 24,
  parameter int M    = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [DF_W-1:0] df_in  [N_DF],
  output logic                   out_valid,
  output logic signed [DF_W-1:0] df_avg [N_DF]
);

  localparam int AW = DF_W + M;

  logic signed [AW-1:0] acc [N_DF];
  logic        [M:0]    n;           // samples accumulated in this run

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < N_DF; i++) begin
        acc[i]    <= '0;
        df_avg[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        n <= '0;
      end else if (in_valid) begin
        logic signed [AW-1:0] sum;
        for (int i = 0; i < N_DF; i++) begin
          sum    = ((n == '0) ? AW'(0) : acc[i]) + AW'(df_in[i]);
          acc[i] <= sum;
          if (n == (M+1)'((1 << M) - 1)) df_avg[i] <= DF_W'(sum >>> M);
        end
        if (n == (M+1)'((1 << M) - 1)) begin
          n         <= '0;
          out_valid <= 1'b1;
        end else begin
          n <= n + 1'b1;
        end
      end
    end
  end

endmodule
