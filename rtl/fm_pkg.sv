// fm_pkg: types and default sizes shared by the double-edge frequency multiplier.
//
// Every state element of the multiplier is a double-edge register pair: reg1
// loads on the rising and reg2 on the falling edge of the reference clock, and
// a selector driven by the clock level shows reg1 while the clock is high and
// reg2 while it is low. The value a rising edge works from is therefore the one
// held in reg2, and the value a falling edge works from is the one in reg1.
// Control logic is evaluated once for each of these two "views" and delivered
// as an edge_ctl_t per edge, so that no flip-flop ever reads the selector
// output while the clock that drives the selector is changing.
//
// The widths are choices of this implementation: the multiplication ratio m is
// M_W bits wide and the half-period counts (quotient Y, output period) CNT_W
// bits wide.
package fm_pkg;

  // Default width of the multiplication ratio m (and of D-counter1, remainder Z,
  // counter2). m may range from 1 to 2**M_W - 1.
  localparam int unsigned DEF_M_W   = 8;
  // Default width of counter1, latch1 (quotient Y) and D-counter2.
  localparam int unsigned DEF_CNT_W = 16;

  // Control of one double-edge counter at one clock edge.
  typedef struct packed {
    logic en;   // count this edge (+1)
    logic clr;  // load the clear value at this edge (wins over en)
  } edge_ctl_t;

endpackage
