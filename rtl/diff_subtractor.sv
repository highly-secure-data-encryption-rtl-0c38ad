// diff_subtractor: subtractor array at the output of the ring-oscillator
// counters.
//
// Successive rings form overlapping pairs, so N_RO counts give N_RO-1
// differential values df[i] = count[i] - count[i+1], each a signed CNT_W-bit
// number. Taking differences cancels whatever shifts all rings of a die
// alike (global process spread, supply, temperature) and keeps the local
// mismatch that identifies the device. Purely combinational; the inputs are
// static when the result is used. The pairing of successive rings, 32 rings
// giving 31 values, and the 24-bit width follow the source; the sign
// convention (lower index minus higher) is this design's choice.
module diff_subtractor #(
  parameter int N_RO  = 32,
  parameter int CNT_W = 24
) (
  input  logic        [CNT_W-1:0] count [N_RO],
  output logic signed [CNT_W-1:0] df    [N_RO-1]
);

  always_comb begin
    for (int i = 0; i < N_RO - 1; i++) df[i] = $signed(count[i] - count[i + 1]);
  end

endmodule
