// tb_ratio_counter: self-checking test of the measuring counters
// (D-counter1, DC1, counter1).
//
// The reference clock has a 10 ns period; measurement windows of random length
// open and close at times that never coincide with a clock edge. The
// testbench counts for itself the clock edges (rising and falling) that fall
// inside each window, N, and at the end of the window checks that D-counter1
// shows N mod m and counter1 shows N div m, for a random ratio m per window.
// Between windows both counters must return to zero.
`timescale 1ns/1ps
module tb_ratio_counter;
  localparam int unsigned M_W = 8, CNT_W = 16;

  logic             clk = 1'b0, rst_n = 1'b1, gate = 1'b0;
  logic [M_W-1:0]   m;
  logic [M_W-1:0]   x;
  logic [CNT_W-1:0] y;
  int               checks = 0, failures = 0, n_edges = 0;

  ratio_counter #(.M_W(M_W), .CNT_W(CNT_W)) dut (.clk, .rst_n, .gate, .m, .x, .y);

  always #5 clk = ~clk;
  always @(posedge clk or negedge clk) if (gate) n_edges++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // Wait a random time that ends 1..4 ns past a clock edge.
  task automatic wait_off_edge(int min_ns, int max_ns);
    int t;
    t = $urandom_range(min_ns, max_ns);
    repeat (t) #1;
    if ($time % 5 == 0) #2;
  endtask

  initial #1 rst_n = 1'b0;  // reset pulse, asserted after time 0

  initial begin
    m = 8'd4;
    #12 rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      m = (w < 2) ? 8'd4 : M_W'($urandom_range(1, 9));
      n_edges = 0;
      wait_off_edge(20, 60);
      gate = 1'b1;
      wait_off_edge(10, 500);
      check("remainder Z", int'(x), n_edges % int'(m));
      check("quotient Y", int'(y), n_edges / int'(m));
      gate = 1'b0;
      wait_off_edge(12, 20);
      check("D-counter1 cleared", int'(x), 0);
      check("counter1 cleared", int'(y), 0);
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
