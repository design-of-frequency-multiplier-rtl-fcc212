// fall_latch: latch1 / latch2 of the multiplier.
//
// A W-bit register that loads d on the falling edge of the 1/2 divider output,
// the end of a measurement window. latch1 holds the quotient Y taken from
// counter1, latch2 the remainder Z taken from D-counter1; both hold their value
// until the next window ends, two input periods later, so the output section
// always works from the last complete measurement. Capturing on the divider's
// falling edge follows the published design. The asynchronous active-low
// reset to 0 is a choice of this implementation: a held quotient of 0 keeps the
// output stopped until the first measurement is complete.
//
// Timing: q takes d at the falling edge of gate, which is not related to the
// reference clock; d must not change at that instant.
module fall_latch #(
  parameter int unsigned W = 16
) (
  input  logic         gate,   // 1/2 divider output; loads on its falling edge
  input  logic         rst_n,  // asynchronous reset, active low
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(negedge gate or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
