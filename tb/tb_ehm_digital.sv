// tb_ehm_digital: two inputs with normal levels 0 and 1 and a preset time of
// 50 cycles. Checks: excursions of 20 and 45 cycles do not alarm; a lasting
// excursion alarms PERSIST_CYC + 3 cycles after it starts (+-1); the alarm is
// latched after the input returns; only the affected channel alarms; clear
// drops the alarm; a channel whose input sits at its normal level never alarms.
module tb_ehm_digital;
  localparam int P = 50;
  logic clk = 0, rst_n = 0;
  logic [1:0] din, alarm;
  logic clear;
  int checks = 0, failures = 0;
  int cyc = 0;

  ehm_digital #(.N_DIG(2), .NORMAL(2'b10), .PERSIST_CYC(P)) dut (.clk, .rst_n, .din, .clear, .alarm);

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

  task automatic pulse(int ch, int len);
    @(negedge clk); din[ch] = ~din[ch];
    repeat (len) @(negedge clk);
    din[ch] = ~din[ch];
    repeat (10) @(negedge clk);
  endtask

  initial begin
    int t0, t;
    din = 2'b10; clear = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    check(alarm == 2'b00, "no alarm at normal levels");
    pulse(0, 20); check(alarm == 2'b00, "20-cycle excursion ignored");
    pulse(1, 45); check(alarm == 2'b00, "45-cycle excursion ignored");
    pulse(0, 45); pulse(0, 45);
    check(alarm == 2'b00, "repeated short excursions ignored");
    // lasting excursion on channel 1 (normal level 1 -> 0)
    @(negedge clk); din[1] = 1'b0; t0 = cyc; t = -1;
    repeat (2 * P) begin
      @(negedge clk);
      if (alarm[1] && t < 0) t = cyc - t0;
    end
    check(t >= P + 2 && t <= P + 4, $sformatf("alarm after %0d cycles", t));
    check(alarm == 2'b10, "only channel 1 alarms");
    din[1] = 1'b1;
    repeat (20) @(negedge clk);
    check(alarm[1], "alarm latched");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(alarm == 2'b00, "clear drops the alarm");
    // channel 0 lasting excursion
    @(negedge clk); din[0] = 1'b1;
    repeat (P + 10) @(negedge clk);
    check(alarm == 2'b01, "channel 0 alarms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
