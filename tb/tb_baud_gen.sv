// tb_baud_gen: checks the spacing of the baud-rate enable pulses.
// A small instance (divisor 10) is checked pulse by pulse over 1000 cycles; an
// instance with the default 50 MHz / 9600 baud settings must pulse every 326
// cycles (50e6 / (16 * 9600) = 325.5, rounded).
module tb_baud_gen;
  logic clk = 0, rst_n = 0;
  logic tick_s, tick_d;
  int checks = 0, failures = 0;

  baud_gen #(.CLK_HZ(1600), .BAUD(10), .OVERSAMPLE(16)) dut_s (.clk, .rst_n, .tick(tick_s));
  baud_gen dut_d (.clk, .rst_n, .tick(tick_d));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_s, n_s, last_d, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_s = -1; n_s = 0; last_d = -1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(posedge clk); #1;
      if (tick_s) begin
        if (last_s >= 0) check(cyc - last_s == 10, $sformatf("small divisor interval %0d", cyc - last_s));
        last_s = cyc; n_s++;
        check(tick_s, "pulse");
      end
      if (tick_d) begin
        if (last_d >= 0) check(cyc - last_d == 326, $sformatf("default interval %0d", cyc - last_d));
        last_d = cyc;
      end
      // a pulse lasts exactly one cycle
      if (tick_s) begin @(posedge clk); #1; cyc++; check(!tick_s, "single-cycle pulse"); end
    end
    check(n_s >= 195 && n_s <= 201, $sformatf("pulse count %0d", n_s));
    check(last_d > 0, "default instance pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
