// remainder_disperser: spreading of the remainder Z over the output periods
// (DC2, counter2, DC4 and the "+1" on latch1's output).
//
// counter2 holds P, the position of the current output period within a group
// of m periods, counting 1, 2, ..., m and starting again at 1: it advances at
// every output pulse, and the digital comparator DC4 sends it back to 1 when
// the pulse ends period m. The comparator DC2 compares the remainder Z with P
// and, while Z >= P, the period length handed to the pulse generator is Y + 1
// instead of Y. The first Z periods of every group are thus one reference half
// period longer, and a group of m periods lasts m*Y + Z half periods: exactly
// the measured input period, with the extra time spread out rather than added
// to one period. The comparisons Z >= P and P against m follow the published
// design.
//
// Choices of this implementation: P counts from 1 (so that "Z >= P" selects
// exactly Z periods); DC4 tests P >= m, so that lowering m cannot strand P above
// it; counter2 is a double-edge register pair advancing at the reference-clock
// edge of the output pulse (the original clocks it from the output signal).
// The period length is produced for both clock-edge views (see fm_pkg).
//
// Timing: p changes at the clock edge of each output pulse; y_eff_* are
// combinational from p and the held Y and Z.
module remainder_disperser
  import fm_pkg::*;
#(
  parameter int unsigned M_W   = DEF_M_W,
  parameter int unsigned CNT_W = DEF_CNT_W
) (
  input  logic             clk,         // reference clock
  input  logic             rst_n,       // asynchronous reset, active low
  input  logic [M_W-1:0]   m,           // multiplication ratio
  input  logic [CNT_W-1:0] y,           // quotient Y from latch1
  input  logic [M_W-1:0]   z,           // remainder Z from latch2
  input  logic             pulse_rise,  // an output pulse starts at the coming rising edge
  input  logic             pulse_fall,  // an output pulse starts at the coming falling edge
  output logic [M_W-1:0]   p,           // counter2: position in the group, 1..m
  output logic [CNT_W:0]   y_eff_rise,  // period length for the rising-edge view
  output logic [CNT_W:0]   y_eff_fall   // period length for the falling-edge view
);

  logic [M_W-1:0] p_rise, p_fall;
  edge_ctl_t      c2_rise, c2_fall;

  // DC4: end of a group when the pulse closes period m.
  function automatic edge_ctl_t c2_control(logic [M_W-1:0] pv, logic pulse);
    edge_ctl_t c;
    c.en  = pulse;
    c.clr = pulse && (pv >= m);
    return c;
  endfunction

  // DC2 and the "+1" circuit: Y, or Y + 1 while Z >= P.
  function automatic logic [CNT_W:0] period_len(logic [M_W-1:0] pv);
    return {1'b0, y} + ((z >= pv) ? (CNT_W+1)'(1) : '0);
  endfunction

  always_comb begin
    c2_rise    = c2_control(p_rise, pulse_rise);
    c2_fall    = c2_control(p_fall, pulse_fall);
    y_eff_rise = period_len(p_rise);
    y_eff_fall = period_len(p_fall);
  end

  // counter2 is a 1-based position: it never holds 0 once out of reset.
  a_p_nonzero: assert property (@(posedge clk) disable iff (!rst_n) p_rise != '0 && p_fall != '0)
    else $error("counter2 holds 0");

  dedge_counter #(.W(M_W), .CLR_VALUE(M_W'(1))) u_counter2 (
    .clk, .rst_n, .at_rise(c2_rise), .at_fall(c2_fall),
    .q(p), .q_rise(p_rise), .q_fall(p_fall)
  );

endmodule
