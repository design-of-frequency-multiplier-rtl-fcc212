// dedge_counter: double-edge counter, the basic element of the multiplier.
//
// Two registers share one "+1" circuit. reg1 loads on the rising and reg2 on
// the falling edge of the reference clock; the selector shows reg1 while clk is
// high and reg2 while clk is low. The "+1" circuit adds one to whatever the
// selector shows, so each edge stores the previous half period's value plus
// one and the selector output q advances every half period of clk: with a
// free-running enable it counts both edges of the reference clock. This
// structure (two edge registers, level-driven selector, shared incrementer)
// follows the published double-edge counter.
//
// Additions of this implementation, needed where the multiplier uses the
// counter: a count enable and a synchronous clear, given separately for the
// rising edge (at_rise) and the falling edge (at_fall), and an asynchronous
// active-low reset. At a rising edge the selector is still showing reg2, so
// reg1 loads from reg2; at a falling edge reg2 loads from reg1. q_rise and
// q_fall are those two registers: the values the selector presents to the next
// rising and the next falling edge. Control logic built from q_rise drives
// at_rise, and from q_fall drives at_fall.
//
// Timing: q changes at every enabled clk edge, zero cycles after the edge.
// Reset and clear load CLR_VALUE. The count wraps modulo 2**W.
module dedge_counter
  import fm_pkg::*;
#(
  parameter int unsigned  W         = DEF_CNT_W,
  parameter logic [W-1:0] CLR_VALUE = '0
) (
  input  logic         clk,      // reference clock
  input  logic         rst_n,    // asynchronous reset, active low
  input  edge_ctl_t    at_rise,  // enable / clear applied at the rising edge
  input  edge_ctl_t    at_fall,  // enable / clear applied at the falling edge
  output logic [W-1:0] q,        // selector output: the count value
  output logic [W-1:0] q_rise,   // value presented to the next rising edge (reg2)
  output logic [W-1:0] q_fall    // value presented to the next falling edge (reg1)
);

  logic [W-1:0] reg1, reg2;

  // "+1" circuit and clear, as seen by each edge.
  function automatic logic [W-1:0] next_value(logic [W-1:0] cur, edge_ctl_t c);
    if (c.clr)     return CLR_VALUE;
    else if (c.en) return cur + W'(1);
    else           return cur;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg1 <= CLR_VALUE;
    else        reg1 <= next_value(reg2, at_rise);
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) reg2 <= CLR_VALUE;
    else        reg2 <= next_value(reg1, at_fall);
  end

  // Selector: reg1 while the reference clock is high, reg2 while it is low.
  assign q      = clk ? reg1 : reg2;
  assign q_rise = reg2;
  assign q_fall = reg1;

endmodule
