// tb_half_divider: self-checking test of the 1/2 divider.
//
// Applies reset, then an input signal with random high and low times, and
// checks that the output is 0 after reset, toggles at every rising edge of the
// input (so it is high for exactly every other input period) and does not
// move on falling edges.
`timescale 1ns/1ps
module tb_half_divider;
  logic sig_in = 1'b0, rst_n = 1'b1, q;
  logic exp_q;
  int   checks = 0, failures = 0;

  half_divider dut (.sig_in, .rst_n, .q);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial #1 rst_n = 1'b0;  // reset pulse, asserted after time 0

  initial begin
    #10 check("reset", q, 1'b0);
    rst_n = 1'b1;
    exp_q = 1'b0;
    repeat (50) begin
      repeat ($urandom_range(3, 40)) #1; sig_in = 1'b1;
      exp_q = ~exp_q;
      #1 check("toggle on rise", q, exp_q);
      repeat ($urandom_range(3, 40)) #1; sig_in = 1'b0;
      #1 check("hold on fall", q, exp_q);
    end
    // Asynchronous reset clears the output.
    rst_n = 1'b0;
    #1 check("async reset", q, 1'b0);
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
