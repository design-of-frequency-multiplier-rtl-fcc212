// pulse_generator: output signal generation (D-counter2 and DC3).
//
// D-counter2 counts every rising and falling edge of the reference clock. The
// digital comparator DC3 compares the count R with the period length Y' (the
// quotient Y, or Y + 1 while a remainder share is due): at the edge where R
// reaches Y', D-counter2 restarts from zero and an output pulse begins. The
// output therefore has a period of Y' reference half periods. Counting half
// periods and firing on R = Y' with a restart of D-counter2 follows the
// published design.
//
// Choices of this implementation:
//  * the output pulse lasts one reference half period. It comes from a
//    double-edge flip-flop of the XOR kind (out = out1 ^ out2, each register
//    loading the wanted value XOR the other), not from a clock-driven
//    selector: a selector would briefly show the other register's stale value
//    after each clock edge, which is harmless on a count but would put
//    glitches on a clock output. `out` therefore changes only when a register
//    changes;
//  * DC3 tests R + 1 >= Y' rather than equality, so that a period length that
//    drops below the running count (input frequency raised) ends the current
//    period at once instead of letting R run around its full range;
//  * while Y' is 0 (no measurement yet) D-counter2 is held at 0 and there is
//    no output. Y' = 1 gives an output that stays high.
//
// Timing: `out` rises at the clock edge that ends a period and falls at the
// next edge. pulse_rise / pulse_fall are combinational and tell, for each edge
// view, that the coming edge starts a pulse; counter2 advances on them.
module pulse_generator
  import fm_pkg::*;
#(
  parameter int unsigned CNT_W = DEF_CNT_W
) (
  input  logic             clk,         // reference clock
  input  logic             rst_n,       // asynchronous reset, active low
  input  logic [CNT_W:0]   y_eff_rise,  // period length Y', rising-edge view
  input  logic [CNT_W:0]   y_eff_fall,  // period length Y', falling-edge view
  output logic [CNT_W:0]   r,           // D-counter2 count R
  output logic             pulse_rise,  // DC3 match at the coming rising edge
  output logic             pulse_fall,  // DC3 match at the coming falling edge
  output logic             out          // multiplied output signal
);

  logic [CNT_W:0] r_rise, r_fall;
  edge_ctl_t      d2_rise, d2_fall;
  logic           out1, out2;

  // DC3: does this edge end the period?
  function automatic logic dc3(logic [CNT_W:0] rv, logic [CNT_W:0] len);
    return (len != '0) && ({1'b0, rv} + 1'b1 >= {1'b0, len});
  endfunction

  always_comb begin
    pulse_rise  = dc3(r_rise, y_eff_rise);
    pulse_fall  = dc3(r_fall, y_eff_fall);
    d2_rise.en  = (y_eff_rise != '0);
    d2_rise.clr = pulse_rise || (y_eff_rise == '0);
    d2_fall.en  = (y_eff_fall != '0);
    d2_fall.clr = pulse_fall || (y_eff_fall == '0);
  end

  dedge_counter #(.W(CNT_W + 1)) u_dcounter2 (
    .clk, .rst_n, .at_rise(d2_rise), .at_fall(d2_fall),
    .q(r), .q_rise(r_rise), .q_fall(r_fall)
  );

  // Output pulse: XOR double-edge flip-flop.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out1 <= 1'b0;
    else        out1 <= pulse_rise ^ out2;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) out2 <= 1'b0;
    else        out2 <= pulse_fall ^ out1;
  end

  assign out = out1 ^ out2;

endmodule
