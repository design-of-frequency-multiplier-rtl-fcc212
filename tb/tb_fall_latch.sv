// tb_fall_latch: self-checking test of latch1 / latch2.
//
// Changes the data input at random times and drives the gate with random
// pulses. The held value must equal the data present at the last falling edge
// of the gate, must ignore rising edges and data changes in between, and must
// be 0 after reset.
`timescale 1ns/1ps
module tb_fall_latch;
  localparam int unsigned W = 12;
  logic         gate = 1'b0, rst_n = 1'b1;
  logic [W-1:0] d = '0, q, held;
  int           checks = 0, failures = 0;

  fall_latch #(.W(W)) dut (.gate, .rst_n, .d, .q);

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial #1 rst_n = 1'b0;  // reset pulse, asserted after time 0

  initial begin
    #5 check("reset", q, '0);
    rst_n = 1'b1;
    held = '0;
    repeat (60) begin
      d = W'($urandom);
      #3 gate = 1'b1;
      #1 check("rising edge ignored", q, held);
      d = W'($urandom);
      #3 check("data change ignored", q, held);
      d = W'($urandom);
      #2 gate = 1'b0;
      held = d;
      #1 check("loaded on falling edge", q, held);
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
