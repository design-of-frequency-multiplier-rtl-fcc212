// tb_freq_multiplier: end-to-end test of the double-edge frequency multiplier
// at its default sizes.
//
// A 480 kHz reference clock (half period 1041.667 ns) runs against an input
// signal whose edges are never placed on a reference edge. The testbench keeps
// its own copy of the measurement window (every other input period), counts
// the reference edges inside it, N, and after each window checks the held
// quotient Y = N div m and remainder Z = N mod m. It times every output period
// in reference half periods and checks that:
//   * each period is Y or Y + 1 half periods long;
//   * any m consecutive periods add up to exactly m*Y + Z = N, so the mean
//     output period times m differs from the input period by less than one
//     reference half period;
//   * the first output pulse after the input appears comes within one input
//     period plus one output period;
//   * after a change of input frequency or of m made at the start of a window,
//     a full output period of the new length is complete within two input
//     periods.
// The sequence follows the three operating examples of the design: m = 4 with
// a 20 kHz input (Y = 12), a step of the input to 35 kHz, and m stepped from 4
// to 7 at 20 kHz (Y = 6, Z = 6). It ends with a stop (reset, input halted) and
// restart. Each mechanism (measurement, DC1 group count, remainder spreading,
// DC4 group wrap, frequency step, ratio step, restart) is counted, and one that
// never happens counts as a failure.
`timescale 1ns/1ps
module tb_freq_multiplier;
  import fm_pkg::*;

  localparam int unsigned M_W   = DEF_M_W;
  localparam int unsigned CNT_W = DEF_CNT_W;
  localparam realtime     THALF = 1041.667;        // half period of 480 kHz
  localparam realtime     T20K  = 50000.0;         // 20 kHz input period
  localparam realtime     T35K  = 28571.429;       // 35 kHz input period

  logic             clk_ref = 1'b0, rst_n = 1'b1, sig_in = 1'b0;
  logic [M_W-1:0]   m = 8'd4;
  logic             out, window;
  logic [CNT_W-1:0] y;
  logic [M_W-1:0]   z, p;

  freq_multiplier dut (.clk_ref, .rst_n, .sig_in, .m, .out, .window, .y, .z, .p);

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_measure = 0, n_dc1 = 0, n_spread = 0, n_dc4 = 0;
  int n_freq_step = 0, n_ratio_step = 0, n_restart = 0;

  task automatic check(string what, bit ok, string detail = "");
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t %s", what, $time, detail);
    end
  endtask

  always #(THALF) clk_ref = ~clk_ref;

  // ---------------------------------------------------------------- model
  bit      win_model = 1'b0;
  int      n_edges = 0;
  int      exp_y = 0, exp_z = 0, exp_m = 4;
  bit      have_meas = 1'b0;
  realtime t_cfg = 0.0;           // last time Y, Z or m changed
  realtime t_latch = 0.0;         // time of the last completed window

  always @(posedge clk_ref or negedge clk_ref) if (win_model) n_edges++;

  always @(negedge rst_n) begin
    win_model = 1'b0; n_edges = 0; have_meas = 1'b0;
  end

  always @(posedge sig_in) if (rst_n) begin
    if (win_model) begin
      int ny, nz;
      ny = n_edges / int'(m);
      nz = n_edges % int'(m);
      if (!have_meas || ny != exp_y || nz != exp_z || int'(m) != exp_m) t_cfg = $realtime;
      exp_y = ny; exp_z = nz; exp_m = int'(m);
      have_meas = 1'b1;
      t_latch = $realtime;
      #1;
      check("quotient Y", int'(y) == exp_y, $sformatf("got %0d exp %0d (N=%0d)", y, exp_y, n_edges));
      check("remainder Z", int'(z) == exp_z, $sformatf("got %0d exp %0d", z, exp_z));
      $display("window closed at %0t: N=%0d m=%0d -> Y=%0d Z=%0d", $time, n_edges, m, y, z);
      n_measure++;
      if (exp_y > 0) n_dc1++;
    end
    win_model = ~win_model;
    n_edges = 0;
  end

  // ------------------------------------------------------- output timing
  localparam int HIST = 16;
  realtime t_out_last = -1.0;
  int      per_len [HIST];
  realtime per_start [HIST];
  int      n_per = 0;
  realtime t_first_out = -1.0;

  always @(posedge out) begin
    if (t_first_out < 0.0) t_first_out = $realtime;
    if (t_out_last >= 0.0) begin
      int hp;
      hp = int'(($realtime - t_out_last) / THALF);
      for (int i = HIST - 1; i > 0; i--) begin
        per_len[i] = per_len[i-1]; per_start[i] = per_start[i-1];
      end
      per_len[0] = hp; per_start[0] = t_out_last;
      n_per++;
      if (have_meas && t_out_last > t_cfg && int'(m) == exp_m) begin
        check("period is Y or Y+1", hp == exp_y || hp == exp_y + 1,
              $sformatf("period %0d, Y=%0d", hp, exp_y));
        if (hp == exp_y + 1) n_spread++;
        if (n_per >= exp_m && per_start[exp_m-1] > t_cfg) begin
          int sum;
          sum = 0;
          for (int i = 0; i < exp_m; i++) sum += per_len[i];
          check("m periods = m*Y+Z", sum == exp_m * exp_y + exp_z,
                $sformatf("sum %0d, expected %0d", sum, exp_m * exp_y + exp_z));
        end
      end
    end
    t_out_last = $realtime;
  end

  // DC4: counter2 returning from m to 1.
  logic [M_W-1:0] p_prev = '0;
  always @(p) begin
    if (rst_n && p == 8'd1 && p_prev != 8'd1 && p_prev != 8'd0) n_dc4++;
    p_prev = p;
  end

  // ------------------------------------------------------ input stimulus
  // Place an input edge: never within 5 ns of a reference edge.
  task automatic safe_edge();
    realtime ph;
    ph = $realtime - $floor($realtime / THALF) * THALF;
    if (ph < 5.0 || ph > THALF - 5.0) #10;
  endtask

  // One input period of T20K or T35K (the delays are kept constant).
  task automatic input_period(realtime t);
    safe_edge(); sig_in = 1'b1;
    if (t == T35K) #(T35K / 2.0); else #(T20K / 2.0);
    safe_edge(); sig_in = 1'b0;
    if (t == T35K) #(T35K / 2.0); else #(T20K / 2.0);
  endtask

  // Wait until the next input rising edge will open a window.
  task automatic align_to_window_open(realtime t);
    while (win_model) input_period(t);
  endtask

  // First complete output period of length len or len+1 that starts after
  // time `after`; returns the time it ends.
  function automatic bit new_period_done(realtime after, int len);
    for (int i = 0; i < HIST && i < n_per; i++)
      if (per_start[i] > after && (per_len[i] == len || per_len[i] == len + 1)) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    realtime t0;
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    #520;

    // ---- m = 4, 20 kHz: first output after one input period (Y = 12).
    m = 8'd4;
    t0 = $realtime;
    input_period(T20K);
    input_period(T20K);
    check("first output within one input period + one output period",
          t_first_out > t0 + T20K && t_first_out < t0 + T20K + 14.0 * THALF,
          $sformatf("first output at %0t, input applied at %0t", t_first_out, t0));
    check("Y = 12 at m = 4, 20 kHz", exp_y == 12 && int'(y) == 12, $sformatf("Y=%0d", y));
    repeat (10) input_period(T20K);

    // ---- input frequency step 20 kHz -> 35 kHz at the start of a window.
    align_to_window_open(T20K);
    t0 = $realtime;
    repeat (2) input_period(T35K);
    begin
      int ny;
      ny = int'($floor(T35K / THALF)) / 4;
      check("frequency step: new Y latched within two input periods",
            int'(y) == ny || int'(y) == ny + 1 || int'(y) == ny - 1, $sformatf("Y=%0d", y));
      check("frequency step: new output period within two input periods",
            new_period_done(t_latch, int'(y)), "");
      if (new_period_done(t_latch, int'(y))) n_freq_step++;
    end
    repeat (10) input_period(T35K);

    // ---- back to 20 kHz, then m 4 -> 7 at the start of a window.
    align_to_window_open(T35K);
    repeat (6) input_period(T20K);
    align_to_window_open(T20K);
    m = 8'd7;
    t0 = $realtime;
    repeat (2) input_period(T20K);
    check("ratio step: Y = 6, Z = 6 at m = 7, 20 kHz",
          int'(y) == 6 && int'(z) == 6, $sformatf("Y=%0d Z=%0d", y, z));
    check("ratio step: new output period within two input periods",
          new_period_done(t_latch, 6), "");
    if (new_period_done(t_latch, 6)) n_ratio_step++;
    repeat (10) input_period(T20K);

    // ---- stop (reset, input halted) and restart at m = 7.
    rst_n = 1'b0;
    #20000;
    check("stopped: no measurement held", y == '0 && z == '0, "");
    rst_n = 1'b1;
    #3333;
    t_first_out = -1.0;
    t_out_last = -1.0;
    n_per = 0;
    t0 = $realtime;
    repeat (3) input_period(T20K);
    check("restart: output within one input period + one output period",
          t_first_out > t0 + T20K && t_first_out < t0 + T20K + 8.0 * THALF,
          $sformatf("first output at %0t", t_first_out));
    if (t_first_out > t0 + T20K && t_first_out < t0 + T20K + 8.0 * THALF) n_restart++;
    repeat (6) input_period(T20K);

    // ---- every mechanism must have happened.
    check("mechanism: measurement", n_measure > 0);
    check("mechanism: DC1 group count", n_dc1 > 0);
    check("mechanism: remainder spread (Y+1 periods)", n_spread > 0);
    check("mechanism: DC4 group wrap", n_dc4 > 0);
    check("mechanism: frequency step", n_freq_step > 0);
    check("mechanism: ratio step", n_ratio_step > 0);
    check("mechanism: restart after stop", n_restart > 0);
    $display("mechanisms: measure=%0d dc1=%0d spread=%0d dc4=%0d freq_step=%0d ratio_step=%0d restart=%0d",
             n_measure, n_dc1, n_spread, n_dc4, n_freq_step, n_ratio_step, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
