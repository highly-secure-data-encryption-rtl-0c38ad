// ro_counter: CNT_W-bit edge counter clocked by one ring oscillator.
//
// The counter runs in the oscillator's own clock domain and counts every
// rising edge of ro_clk. It is cleared asynchronously by clr, which the
// measurement sequencer raises while the ring is stopped; the ring is then
// enabled for exactly one counting window, so count ends up holding the
// number of periods in that window (f_RO x window, e.g. about 2.05 million
// for 102 MHz and 20 ms). Once the ring stops, count is static and the
// system-clock logic can read it without synchronisers. One counter per ring
// and the 24-bit width follow the source; the asynchronous clear and the
// gate-the-ring scheme are this design's choices.
module ro_counter #(
  parameter int CNT_W = 24
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
