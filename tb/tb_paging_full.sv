// tb_paging_full: one complete operation of the design at its default
// settings (50 MHz, 9600 baud, 0.4 s sampling, 5 taps, threshold 10, 1 s
// response timeout, 1 ms control period). The motor model moves a quarter of
// the way to the drive every millisecond; the GSM modem model works at
// 5208 cycles per bit (9600 baud at 50 MHz).
//
// Sequence: the modem is put into text mode; the motor runs at reference 100
// for 1.2 s without alarm; the speed sensor then fails and the design must
// raise the alarm within one sampling period (0.4 s), switch the motor off and
// deliver exactly one SMS with the expected lines. Roughly 90 million cycles.
module tb_paging_full;
  localparam int CLK_HZ  = 50_000_000;
  localparam int T       = CLK_HZ / 5 * 2;
  localparam int CC      = CLK_HZ / 1000;
  localparam int BIT_CYC = CLK_HZ / 9600;

  logic clk = 0, rst_n = 0;
  logic [7:0] ref_speed, act_speed, drive;
  logic [1:0] dig_in = 2'b00;
  logic [2:0] alarms;
  logic [1:0] page_id;
  logic alarm_clear, motor_off, modem_txd, modem_rxd, modem_ready;
  logic paging_busy, page_sent, comm_error;
  logic mute = 0;
  int n_init, n_dest, n_text, n_bad, n_sms, n_ignored;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int  motor = 0;
  bit  sensor_fail = 0;
  int  mcnt = 0;
  int  n_page_pulses = 0;

  paging_controller_top dut (
    .clk, .rst_n, .ref_speed, .act_speed, .dig_in, .alarm_clear, .drive, .motor_off, .alarms, .page_id,
    .modem_txd, .modem_rxd, .modem_ready, .paging_busy, .page_sent, .comm_error);

  gsm_modem_model #(.BIT_CYC(BIT_CYC)) modem (
    .clk, .rxd(modem_txd), .txd(modem_rxd), .mute,
    .n_init, .n_dest, .n_text, .n_bad, .n_sms, .n_ignored);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && page_sent) n_page_pulses <= n_page_pulses + 1;
    if (mcnt == CC - 1) begin
      mcnt <= 0;
      motor <= motor + (int'(drive) - motor) / 4;
    end else mcnt <= mcnt + 1;
  end
  assign act_speed = sensor_fail ? 8'd0 : 8'(motor);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1500000000;   // 150 million cycles
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    ref_speed = 0; alarm_clear = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    t0 = cyc;
    while (!modem_ready && cyc - t0 < 5_000_000) @(negedge clk);
    check(modem_ready && n_init == 1, "modem put into text mode with one command");
    // 10 characters at 10 bits each, plus the 8-character answer (with echo, 16)
    check(cyc - t0 < 30 * 10 * BIT_CYC, $sformatf("initialisation took %0d cycles", cyc - t0));
    ref_speed = 100;
    repeat (3 * T) @(negedge clk);
    check(!motor_off, "no alarm during 1.2 s of normal running");
    check(act_speed >= 95 && act_speed <= 105, $sformatf("speed tracks the reference (%0d)", act_speed));
    sensor_fail = 1; t0 = cyc;
    while (!motor_off && cyc - t0 < 2 * T) @(negedge clk);
    check(motor_off, "alarm on sensor failure");
    check(cyc - t0 <= longint'(T + 4), $sformatf("alarm within 0.4 s (%0d cycles)", cyc - t0));
    repeat (2 * CC) @(negedge clk);
    check(drive == 0, "motor switched off");
    t0 = cyc;
    while (n_page_pulses == 0 && cyc - t0 < 10_000_000) @(negedge clk);
    check(n_page_pulses == 1 && n_sms == 1, "one SMS delivered");
    check(n_dest == 1 && n_text == 1 && n_bad == 0, "destination and text lines as expected");
    check(page_id == 2'd0 && modem.last_text == "Hello world", "speed alarm text");
    check(alarms == 3'b001, "only the speed alarm is set");
    check(!comm_error, "no communication error");
    $display("page took %0d cycles after the alarm", cyc - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
