// tb_ehm: error handling module with a 10-cycle sampling period, 5 taps and a
// threshold of 10. Checks: an error of exactly 10 never alarms (not exceeded);
// an error of 11 alarms after the fifth sample (sum 55 > 50) and not after the
// fourth (44); -60 alarms after the first sample (magnitude); the alarm stays
// latched when the error goes away; clear drops it; a single surge averaged
// with small errors does not alarm. The alarm time is checked in cycles.
module tb_ehm;
  localparam int T = 10;
  logic clk = 0, rst_n = 0;
  logic clear, alarm;
  logic signed [8:0] e;
  logic signed [11:0] e_sum;
  int checks = 0, failures = 0;
  int cyc = 0;

  ehm #(.SAMPLE_CYC(T), .N_TAPS(5), .E_TH(10), .E_W(9)) dut (.clk, .rst_n, .e, .clear, .alarm, .e_sum);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_clear();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
  endtask

  // Apply a constant error right after a clear and return the cycle the alarm rose.
  task automatic run_const(int v, int max_cyc, output int t_alarm);
    int t0;
    e = 9'(v);
    do_clear();
    t0 = cyc; t_alarm = -1;
    for (int i = 0; i < max_cyc; i++) begin
      @(negedge clk);
      if (alarm && t_alarm < 0) t_alarm = cyc - t0;
    end
  endtask

  initial begin
    int ta;
    clear = 0; e = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_const(10, 20 * T, ta);
    check(ta < 0, "error equal to the threshold does not alarm");
    run_const(-10, 20 * T, ta);
    check(ta < 0, "error of -10 does not alarm");
    run_const(11, 20 * T, ta);
    // fifth sample is taken at cycle 5T after clear; alarm two cycles later
    check(ta >= 5 * T && ta <= 5 * T + 3, $sformatf("error 11 alarms after the fifth sample (t=%0d)", ta));
    e = 0;
    repeat (10 * T) @(negedge clk);
    check(alarm, "alarm latched");
    run_const(-60, 3 * T, ta);
    check(ta >= T && ta <= T + 3, $sformatf("error -60 alarms after first sample (t=%0d)", ta));
    run_const(12, 4 * T + T / 2, ta);
    check(ta < 0 && !alarm, "four samples of 12 (sum 48) do not alarm");
    // surge: one sample of 40 between zeros, average 8
    e = 0; do_clear();
    for (int i = 0; i < 12 * T; i++) begin
      @(negedge clk);
      e = (i >= 2 * T && i < 3 * T) ? 9'sd40 : 9'sd0;
    end
    check(!alarm, "single surge of 40 is averaged away");
    e = 9'sd0; do_clear();
    check(!alarm && e_sum == 0, "clear drops alarm and empties the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
