// stabilizer: turns the averaged differential frequencies into the stable
// PUF bit-string.
//
// The low bits of a measured frequency difference flip from one measurement
// to the next while the high bits do not. The stabilizer therefore drops the
// same N_EX least significant bits of every averaged value and keeps the
// DF_W-N_EX upper bits, sign included, concatenating them with df_avg[0]
// in the most significant position. With the default 31 values of 24 bits
// and N_EX = 15 the bit-string is 279 bits. Interface: on in_valid the new
// bit-string is registered; out_valid pulses once, one cycle later, and
// bitstring holds until the next in_valid. Cutting a fixed number of low
// bits from every value, and N_EX = 15, follow the source; the bit order is
// this design's choice.
module stabilizer #(
  parameter int N_DF = 31,
  parameter int DF_W = 24,
  parameter int N_EX = 15
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [DF_W-1:0]     df_avg [N_DF],
  output logic                       out_valid,
  output logic [N_DF*(DF_W-N_EX)-1:0] bitstring
);

  localparam int KEEP = DF_W - N_EX;

  if (N_EX < 0 || N_EX >= DF_W) begin : g_bad_nex
    $error("stabilizer: N_EX must be 0..DF_W-1");
  end

  logic [N_DF*KEEP-1:0] cut;

  always_comb begin
    for (int i = 0; i < N_DF; i++)
      cut[(N_DF - 1 - i)*KEEP +: KEEP] = df_avg[i][DF_W-1:N_EX];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bitstring <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bitstring <= cut;
    end
  end

endmodule
