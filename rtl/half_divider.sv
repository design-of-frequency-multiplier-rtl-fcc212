// half_divider: the 1/2 frequency divider on the input signal.
//
// A toggle flip-flop clocked by the rising edge of the input signal. Its
// output is high for one whole input period and low for the next, so it marks
// every other input period as a measurement window: the multiplier counts
// reference-clock edges while it is high and takes the result on its falling
// edge. Dividing on the input's rising edge follows the published design; the
// asynchronous active-low reset, which clears the output to 0, is a choice of
// this implementation (the first input rising edge after reset then opens the
// first measurement window).
//
// Timing: q toggles at each rising edge of sig_in; q has half the input
// frequency and 50% duty.
module half_divider (
  input  logic sig_in,  // input signal to be multiplied
  input  logic rst_n,   // asynchronous reset, active low
  output logic q        // divided output: high for every other input period
);

  always_ff @(posedge sig_in or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
  end

endmodule
