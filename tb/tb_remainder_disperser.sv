// tb_remainder_disperser: self-checking test of the remainder spreading
// (DC2, counter2, DC4).
//
// Output pulses are announced to the block at random clock edges, as the pulse
// generator would: pulse_rise only while the clock is low (ahead of a rising
// edge) and pulse_fall only while it is high. The testbench keeps its own count
// of the position P (1, 2, ..., m, 1, ...) and checks counter2 against it, and
// checks that the period length offered to the generator is Y + 1 while
// Z >= P and Y otherwise, for random Y, Z < m and m. It also checks that each
// group of m periods, summed, lasts m*Y + Z.
`timescale 1ns/1ps
module tb_remainder_disperser;
  localparam int unsigned M_W = 8, CNT_W = 16;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic [M_W-1:0]   m, z, p;
  logic [CNT_W-1:0] y;
  logic             pulse_rise = 1'b0, pulse_fall = 1'b0;
  logic [CNT_W:0]   y_eff_rise, y_eff_fall;
  int               checks = 0, failures = 0;
  int               exp_p, group_sum;

  remainder_disperser #(.M_W(M_W), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .m, .y, .z, .pulse_rise, .pulse_fall, .p, .y_eff_rise, .y_eff_fall
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial #1 rst_n = 1'b0;  // reset pulse, asserted after time 0

  initial begin
    m = 8'd4; y = 16'd12; z = 8'd1;
    #2 check("reset position", int'(p), 1);
    rst_n = 1'b1;
    exp_p = 1;
    for (int cfg = 0; cfg < 30; cfg++) begin
      if (cfg > 0) begin
        m = M_W'($urandom_range(1, 12));
        y = CNT_W'($urandom_range(2, 500));
        z = M_W'($urandom_range(0, int'(m) - 1));
      end
      // Start each configuration at the beginning of a group.
      while (exp_p != 1) begin
        @(negedge clk); #1;
        pulse_rise = 1'b1; @(posedge clk); #1 pulse_rise = 1'b0;
        exp_p = (exp_p >= int'(m)) ? 1 : exp_p + 1;
      end
      for (int g = 0; g < 3; g++) begin
        group_sum = 0;
        for (int k = 0; k < int'(m); k++) begin
          #1;
          check("position P", int'(p), exp_p);
          // Lengths as seen by either edge; they must agree while P is steady.
          check("period length Y'", (clk ? int'(y_eff_fall) : int'(y_eff_rise)),
                int'(y) + ((int'(z) >= exp_p) ? 1 : 0));
          group_sum += (clk ? int'(y_eff_fall) : int'(y_eff_rise));
          // Announce the pulse ahead of a random edge.
          repeat ($urandom_range(0, 3)) @(posedge clk or negedge clk);
          #1;
          if (clk) begin pulse_fall = 1'b1; @(negedge clk); #1 pulse_fall = 1'b0; end
          else     begin pulse_rise = 1'b1; @(posedge clk); #1 pulse_rise = 1'b0; end
          exp_p = (exp_p >= int'(m)) ? 1 : exp_p + 1;
        end
        check("group length m*Y+Z", group_sum, int'(m) * int'(y) + int'(z));
      end
    end
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
