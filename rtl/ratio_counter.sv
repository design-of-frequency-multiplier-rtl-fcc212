// ratio_counter: the measuring half of the multiplier (D-counter1, DC1, counter1).
//
// While the measurement window `gate` (the 1/2 divider output) is high,
// D-counter1 counts every rising and falling edge of the reference clock. The
// digital comparator DC1 watches the count: at the edge where D-counter1 would
// reach the multiplication ratio m, D-counter1 is cleared instead and counter1
// counts up by one. Counting N edges in the window therefore leaves counter1 at
// Y = N div m and D-counter1 at Z = N mod m; these are taken by latch1 and
// latch2 on the falling edge of `gate`. That division-by-repeated-count scheme
// follows the published design.
//
// Choices of this implementation:
//  * counter1 is built from the same double-edge register pair as D-counter1
//    and counts at the reference-clock edge at which DC1 matches (in the
//    published circuit it is an ordinary counter clocked by DC1), so the whole
//    block works on the one reference clock;
//  * DC1 tests "count + 1 >= m" rather than equality, so that a ratio lowered
//    in the middle of a window cannot let the count run past m;
//  * both counters are held at zero while `gate` is low, which readies them
//    for the next window; counter1 stops at its maximum instead of wrapping;
//  * m = 0 is treated like m = 1.
//
// Timing: x and y change at reference-clock edges only. `gate` is sampled at
// both clock edges and is not synchronised: its edges must not coincide with
// reference-clock edges (the two clocks are unrelated, as in the original).
module ratio_counter
  import fm_pkg::*;
#(
  parameter int unsigned M_W   = DEF_M_W,
  parameter int unsigned CNT_W = DEF_CNT_W
) (
  input  logic             clk,    // reference clock
  input  logic             rst_n,  // asynchronous reset, active low
  input  logic             gate,   // measurement window (1/2 divider output)
  input  logic [M_W-1:0]   m,      // multiplication ratio
  output logic [M_W-1:0]   x,      // D-counter1: edges counted modulo m (remainder Z)
  output logic [CNT_W-1:0] y       // counter1: number of whole groups of m edges (Y)
);

  logic [M_W-1:0]   x_rise, x_fall;
  logic [CNT_W-1:0] y_rise, y_fall;
  edge_ctl_t        dc1_rise, dc1_fall, c1_rise, c1_fall;

  // DC1 together with the control of both counters, for one edge.
  function automatic void control(input  logic [M_W-1:0]   xv,
                                  input  logic [CNT_W-1:0] yv,
                                  output edge_ctl_t        dc,
                                  output edge_ctl_t        c1);
    logic hit;
    hit    = gate && ({1'b0, xv} + 1'b1 >= {1'b0, m});
    dc.en  = gate;
    dc.clr = !gate || hit;
    c1.en  = hit && (yv != '1);
    c1.clr = !gate;
  endfunction

  always_comb begin
    control(x_rise, y_rise, dc1_rise, c1_rise);
    control(x_fall, y_fall, dc1_fall, c1_fall);
  end

  dedge_counter #(.W(M_W)) u_dcounter1 (
    .clk, .rst_n, .at_rise(dc1_rise), .at_fall(dc1_fall),
    .q(x), .q_rise(x_rise), .q_fall(x_fall)
  );

  dedge_counter #(.W(CNT_W)) u_counter1 (
    .clk, .rst_n, .at_rise(c1_rise), .at_fall(c1_fall),
    .q(y), .q_rise(y_rise), .q_fall(y_fall)
  );

endmodule
