// tb_fm_accuracy: steady-state accuracy of the frequency multiplier over random
// operating points, at the default sizes.
//
// For 24 random pairs of ratio m (2..12) and input period (integer ns, long
// enough for Y >= 3) against a 480 kHz reference, the testbench runs the input
// for nine periods and then checks:
//   * the held measurement N = m*Y + Z matches the true window length to within
//     one reference half period (the errors at the start and at the end of the
//     window are each under one half period and partly cancel);
//   * every output period is Y or Y + 1 half periods long, so the period jitter
//     is at most one half period, i.e. a fraction m*f_in / (2*f_ref) of the
//     output period;
//   * any m consecutive output periods last exactly N half periods, so the
//     average output frequency is m times the measured input frequency.
// The input edges are kept at least 5 ns away from reference edges.
`timescale 1ns/1ps
module tb_fm_accuracy;
  import fm_pkg::*;

  localparam realtime THALF = 1041.667;

  logic                 clk_ref = 1'b0, rst_n = 1'b1, sig_in = 1'b0;
  logic [DEF_M_W-1:0]   m = 8'd4;
  logic                 out, window;
  logic [DEF_CNT_W-1:0] y;
  logic [DEF_M_W-1:0]   z, p;

  freq_multiplier dut (.clk_ref, .rst_n, .sig_in, .m, .out, .window, .y, .z, .p);

  int checks = 0, failures = 0;

  task automatic check(string what, bit ok, string detail = "");
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t %s", what, $time, detail);
    end
  endtask

  always #(THALF) clk_ref = ~clk_ref;

  // Window length as the testbench sees it: time between the input rising
  // edges that open and close a window.
  realtime t_open = 0.0, t_win = 0.0, t_close = 0.0;
  always @(posedge window) t_open = $realtime;
  always @(negedge window) begin
    t_win   = $realtime - t_open;
    t_close = $realtime;
    n_per   = 0;
  end

  // Output periods, in half periods, that started after the last measurement.
  localparam int HIST = 16;
  int      per_len [HIST];
  int      n_per = 0;
  realtime t_out_last = -1.0;
  always @(posedge out) begin
    if (t_out_last > t_close) begin
      for (int i = HIST - 1; i > 0; i--) per_len[i] = per_len[i-1];
      per_len[0] = int'(($realtime - t_out_last) / THALF);
      n_per++;
    end
    t_out_last = $realtime;
  end

  task automatic safe_edge();
    realtime ph;
    ph = $realtime - $floor($realtime / THALF) * THALF;
    if (ph < 5.0 || ph > THALF - 5.0) #10;
  endtask

  task automatic input_period(int t_ns);
    safe_edge(); sig_in = 1'b1;
    repeat (t_ns / 2) #1;
    safe_edge(); sig_in = 1'b0;
    repeat (t_ns - t_ns / 2) #1;
  endtask

  initial begin
    for (int trial = 0; trial < 24; trial++) begin
      int t_in, mm;
      mm = $urandom_range(2, 12);
      t_in = $urandom_range(int'(THALF) * mm * 3 + 100, 120000);
      rst_n = 1'b0;
      m = DEF_M_W'(mm);
      #3000 rst_n = 1'b1;
      repeat ($urandom_range(100, 900)) #1;
      repeat (5) input_period(t_in);
      // Stop two input periods after a window closes, just before the next
      // one closes, and judge the periods that started after that measurement.
      while (!window) input_period(t_in);
      repeat (2) input_period(t_in);
      begin
        int n, yy, zz, sum;
        yy = int'(y); zz = int'(z);
        n = mm * yy + zz;
        check("measurement within one half period of the input period",
              (n * THALF - t_win < THALF) && (t_win - n * THALF < THALF),
              $sformatf("N=%0d window=%0t ns", n, t_win));
        check("enough output periods", n_per >= 2 * mm - 2, $sformatf("%0d", n_per));
        for (int i = 0; i < HIST && i < n_per; i++)
          check("period is Y or Y+1", per_len[i] == yy || per_len[i] == yy + 1,
                $sformatf("period %0d, Y=%0d", per_len[i], yy));
        sum = 0;
        for (int i = 0; i < mm && i < HIST; i++) sum += per_len[i];
        if (mm <= HIST && n_per >= mm)
          check("m periods = N", sum == n, $sformatf("sum %0d, N %0d", sum, n));
        $display("m=%0d T_in=%0d ns: Y=%0d Z=%0d, output %0d..%0d half periods",
                 mm, t_in, yy, zz, yy, (zz > 0) ? yy + 1 : yy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
