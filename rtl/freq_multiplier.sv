// freq_multiplier: all-digital frequency multiplier built on double-edge counters.
//
// The circuit produces m output pulses for every period of the input signal
// sig_in, using a free-running reference clock clk_ref that is not locked to
// the input. It works in two halves that run side by side:
//
//  measuring  The 1/2 divider opens a window lasting one input period every
//             two input periods. During the window D-counter1 counts both edges
//             of clk_ref, in groups of m (DC1), and counter1 counts the groups.
//             When the window closes, latch1 takes the quotient Y and latch2
//             the remainder Z: the input period is m*Y + Z reference half
//             periods.
//  generating D-counter2 counts reference half periods and DC3 emits an output
//             pulse every Y' half periods, where Y' is Y + 1 for the first Z
//             output periods of each group of m (DC2, counter2, DC4) and Y for
//             the rest. Each output period is Y or Y + 1 half periods, and m
//             consecutive periods add up to the measured input period.
//
// Because both clock edges are counted, the quantisation error is below half a
// reference period, and because the quotient is ready at the end of the first
// input period, output starts one input period after the input appears and
// follows a change of frequency or of m within two input periods. The block
// structure (two double-edge counters, two counters, 1/2 divider, two latches,
// four comparators) follows the published design; the choices this
// implementation makes are described in the sub-module headers (mainly: every
// counter uses the double-edge register pair on clk_ref, the comparators DC1,
// DC3 and DC4 use >= instead of =, and the output pulse lasts one reference
// half period).
//
// Interface: clk_ref reference clock; rst_n asynchronous active-low reset;
// sig_in input signal; m multiplication ratio (1 .. 2**M_W-1, may change at
// any time); out the multiplied signal. y and z show the held quotient and
// remainder, window the 1/2 divider output, p
// the position of the current output period in its group of m.
//
// Timing: every output edge is on a clk_ref edge. The first output pulse comes
// Y' half periods after the end of the first input period after reset. sig_in
// is not synchronised to clk_ref; its edges are assumed never to coincide with
// clk_ref edges.
module freq_multiplier
  import fm_pkg::*;
#(
  parameter int unsigned M_W   = DEF_M_W,
  parameter int unsigned CNT_W = DEF_CNT_W
) (
  input  logic             clk_ref,  // reference clock
  input  logic             rst_n,    // asynchronous reset, active low
  input  logic             sig_in,   // input signal
  input  logic [M_W-1:0]   m,        // multiplication ratio
  output logic             out,      // multiplied output signal
  output logic             window,   // 1/2 divider output (measurement window)
  output logic [CNT_W-1:0] y,        // quotient Y held in latch1
  output logic [M_W-1:0]   z,        // remainder Z held in latch2
  output logic [M_W-1:0]   p         // counter2: position of the output period, 1..m
);

  logic [M_W-1:0]   x_cnt;
  logic [CNT_W-1:0] y_cnt;
  logic [CNT_W:0]   y_eff_rise, y_eff_fall;
  logic             pulse_rise, pulse_fall;

  half_divider u_div (.sig_in, .rst_n, .q(window));

  ratio_counter #(.M_W(M_W), .CNT_W(CNT_W)) u_measure (
    .clk(clk_ref), .rst_n, .gate(window), .m, .x(x_cnt), .y(y_cnt)
  );

  fall_latch #(.W(CNT_W)) u_latch1 (.gate(window), .rst_n, .d(y_cnt), .q(y));
  fall_latch #(.W(M_W))   u_latch2 (.gate(window), .rst_n, .d(x_cnt), .q(z));

  remainder_disperser #(.M_W(M_W), .CNT_W(CNT_W)) u_disperse (
    .clk(clk_ref), .rst_n, .m, .y, .z, .pulse_rise, .pulse_fall,
    .p, .y_eff_rise, .y_eff_fall
  );

  pulse_generator #(.CNT_W(CNT_W)) u_gen (
    .clk(clk_ref), .rst_n, .y_eff_rise, .y_eff_fall,
    .r(), .pulse_rise, .pulse_fall, .out
  );

endmodule
