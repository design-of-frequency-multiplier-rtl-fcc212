// tb_pulse_generator: self-checking test of the output generator
// (D-counter2, DC3).
//
// Holds a period length L on both edge views and measures the output: the
// time between rising edges of `out` must be L reference half periods (5 ns
// each here) and every pulse must last one half period. With L = 0 the output
// must stay low. A length that drops below the running count must end the
// current period at the next edge. The count of pulses announced on
// pulse_rise / pulse_fall must equal the count of output pulses.
`timescale 1ns/1ps
module tb_pulse_generator;
  localparam int unsigned CNT_W = 16;

  logic           clk = 1'b0, rst_n = 1'b1;
  logic [CNT_W:0] len, r;
  logic           pulse_rise, pulse_fall, out;
  int             checks = 0, failures = 0;
  int             announced = 0, seen = 0;
  realtime        t_last, t_rise;

  pulse_generator #(.CNT_W(CNT_W)) dut (
    .clk, .rst_n, .y_eff_rise(len), .y_eff_fall(len), .r, .pulse_rise, .pulse_fall, .out
  );

  always #5 clk = ~clk;
  always @(posedge clk or negedge clk) if (rst_n && ((clk && pulse_rise) || (!clk && pulse_fall))) announced++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial #1 rst_n = 1'b0;  // reset pulse, asserted after time 0

  initial begin
    len = '0;
    #12 rst_n = 1'b1;
    // No measurement yet: no output.
    repeat (40) begin #5; check("idle output", int'(out), 0); end
    for (int i = 0; i < 12; i++) begin
      len = (CNT_W+1)'((i < 2) ? 12 + i : $urandom_range(2, 40));
      // Let the new length take hold, then time a few periods.
      @(posedge out); t_last = $realtime;
      repeat (4) begin
        @(negedge out); check("pulse width", int'(($realtime - t_last) / 5.0), 1);
        @(posedge out); t_rise = $realtime;
        check("period (half periods)", int'((t_rise - t_last) / 5.0), int'(len));
        seen++;
        t_last = t_rise;
      end
    end
    // Shorten the period while the count is high: next pulse within one edge.
    len = 17'd40;
    @(posedge out);
    repeat (30) @(posedge clk or negedge clk);
    #1 len = 17'd5; t_last = $realtime;
    @(posedge out);
    check("shortened period ends at next edge", int'(($realtime - t_last) / 5.0), 1);
    check("announced pulses counted", int'(announced > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
