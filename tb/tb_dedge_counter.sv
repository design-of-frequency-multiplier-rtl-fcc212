// tb_dedge_counter: self-checking test of the double-edge counter.
//
// Runs the counter on a 10 ns clock and changes its controls in the middle of
// each half period, so that every edge sees stable controls. A reference model
// in the testbench applies the same controls edge by edge. After every edge
// the selector output q, and the two register views, are compared with the
// model: with counting enabled on both edges the count must advance every half
// period (two counts per clock cycle), which is the defining property of the
// double-edge counter. Random enables and clears are then mixed in.
`timescale 1ns/1ps
module tb_dedge_counter;
  import fm_pkg::*;

  localparam int unsigned W = 6;

  logic         clk = 1'b0, rst_n = 1'b1;
  edge_ctl_t    at_rise, at_fall;
  logic [W-1:0] q, q_rise, q_fall;
  int           checks = 0, failures = 0;
  logic [W-1:0] model;
  int           edges = 0;

  dedge_counter #(.W(W)) dut (.clk, .rst_n, .at_rise, .at_fall, .q, .q_rise, .q_fall);

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // Reference: apply the control of the edge that just happened.
  always @(posedge clk or negedge clk) begin
    if (rst_n) begin
      edge_ctl_t c;
      c = clk ? at_rise : at_fall;
      if (c.clr)     model <= '0;
      else if (c.en) model <= model + 1'b1;
    end
  end

  initial #1 rst_n = 1'b0;  // reset pulse, asserted after time 0

  initial begin
    at_rise = '0; at_fall = '0; model = '0;
    #12 rst_n = 1'b1;            // release in a low phase (clk low from 10 to 15)
    #1 check("reset value", q, '0);
    // Free counting on both edges: q must advance every half period.
    at_rise = '{en: 1'b1, clr: 1'b0};
    at_fall = '{en: 1'b1, clr: 1'b0};
    @(posedge clk); #2;           // t = 17
    begin
      logic [W-1:0] start;
      start = q;
      repeat (20) begin
        #5;                       // next half period, 2 ns after the edge
        edges++;
        check("both-edge count", q, W'(start + edges));
        check("model", q, model);
      end
    end
    // Only the falling edge counts, then only the rising edge.
    at_rise.en = 1'b0;
    repeat (8) begin #5; check("fall-only", q, model); end
    at_rise.en = 1'b1; at_fall.en = 1'b0;
    repeat (8) begin #5; check("rise-only", q, model); end
    // Clear at a rising edge.
    at_rise.clr = 1'b1;
    repeat (2) #5;
    at_rise.clr = 1'b0;
    check("clear", q, model);
    // Random controls, changed mid half period.
    repeat (400) begin
      at_rise = edge_ctl_t'($urandom_range(0, 3));
      at_fall = edge_ctl_t'($urandom_range(0, 3));
      if ($urandom_range(0, 7) != 0) begin at_rise.clr = 1'b0; at_fall.clr = 1'b0; end
      #5;
      check("random q", q, model);
      check("views", clk ? q_fall : q_rise, q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
