// ring_oscillator: BEHAVIOURAL MODEL (not synthesizable) of one ring
// oscillator of the PUF: a NAND gate whose second input is the enable,
// followed by N_INV inverters, the last inverter's output fed back to the
// NAND and also driven out to the edge counter.
//
// In silicon each stage is one FPGA LUT and the frequency (about 102 MHz for
// 16 inverters) depends on the die and on where the ring is placed; that
// dependence is what the PUF measures. The model reproduces it with
// constants derived at elaboration from three parameters: DIE_SEED (which
// chip), PLACE_SEED (where the array is placed) and RO_INDEX (which ring in
// the array). Following the usual split of RO frequency into a nominal value
// plus global process, local process and operating-condition terms, the
// stage delay is STAGE_PS plus a die-wide offset (up to +/-GLOBAL_VAR_PS),
// plus a per-ring offset (up to +/-LOCAL_VAR_PS). Temporal drift of supply
// and temperature is modelled by a random offset of up to +/-OP_VAR_PS on
// the half period, drawn afresh each time the ring is enabled; the default
// 3 ps is about 0.06 % of the half period, the size of the frequency
// spread the source measured between repeated 20 ms counts.
//
// Interface and timing: while en is low the NAND output is 1 and, through an
// even number of inverters, ro_out rests at 1. While en is high ro_out
// toggles every (N_INV+1) stage delays. The structure (NAND plus 16
// inverters, enable input) follows the source; the delay numbers are chosen
// so the nominal frequency matches the ~102 MHz it reports, and the spread
// and jitter values are this model's own.
// Lint notes that the delay value is only known at run time (ZERODLY);
// it is never zero, since the half period is thousands of picoseconds.
module ring_oscillator #(
  parameter int          N_INV         = 16,
  parameter int          STAGE_PS      = 287,
  parameter int          GLOBAL_VAR_PS = 10,
  parameter int          LOCAL_VAR_PS  = 29,
  parameter int          OP_VAR_PS     = 3,
  parameter int unsigned DIE_SEED      = 1,
  parameter int unsigned PLACE_SEED    = 1,
  parameter int unsigned RO_INDEX      = 0
) (
  input  logic en,
  output logic ro_out
);

  // 32-bit integer hash used to turn the seeds into fixed "process" offsets
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned v;
    v = x;
    v = v ^ (v >> 16);
    v = v * 32'h7feb352d;
    v = v ^ (v >> 15);
    v = v * 32'h846ca68b;
    v = v ^ (v >> 16);
    return v;
  endfunction

  function automatic int spread(input int unsigned h, input int range_ps);
    return int'(h % (2 * range_ps + 1)) - range_ps;
  endfunction

  localparam int GLOBAL_PS = spread(mix32(DIE_SEED ^ 32'h9e3779b9), GLOBAL_VAR_PS);
  localparam int LOCAL_PS  = spread(mix32(mix32(DIE_SEED) ^ mix32(PLACE_SEED + 32'h1000)
                                          ^ mix32(RO_INDEX + 32'h2000)), LOCAL_VAR_PS);
  localparam int HALF_PS   = (N_INV + 1) * (STAGE_PS + GLOBAL_PS + LOCAL_PS);

  int op_ps;

  always begin
    ro_out = 1'b1;
    wait (en);
    op_ps = int'($urandom_range(2 * OP_VAR_PS)) - OP_VAR_PS;
    while (en) begin
      #((HALF_PS + op_ps) * 1ps);
      if (en) ro_out = ~ro_out;
    end
  end

endmodule
