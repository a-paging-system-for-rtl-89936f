// tb_paging_controller_top: end-to-end test of the speed controller with its
// paging system, at reduced timing: 32 MHz nominal clock and 1 Mbaud (32
// cycles per bit), a sampling period of 4000 cycles, a 20000-cycle response
// timeout and a control update every 20 cycles. Around the design are a
// first-order motor model (speed moves a quarter of the way to the drive each
// control period) and the behavioural GSM modem.
//
// Sequence: the modem ignores the first text-mode command (initialisation
// retry); the motor is started and must track the reference without alarm; a
// short speed dip (one sample of error 40) must be averaged away; a sensor
// failure (measured speed 0) must raise the alarm within one sampling period,
// switch the motor off and page once with the right lines; after re-arming,
// the motor runs again; a digital alarm input that is briefly abnormal is
// ignored, one that stays abnormal past its preset time (3000 cycles) stops
// the motor and pages with its own text and source number; after another
// re-arm, a second speed failure with a muted modem must end in
// comm_error after five trials. Every mechanism is counted and one that never
// happened is a failure.
module tb_paging_controller_top;
  localparam int T       = 4000;
  localparam int BIT_CYC = 32;
  localparam int CC      = 20;

  logic clk = 0, rst_n = 0;
  logic [7:0] ref_speed, act_speed, drive;
  logic [1:0] dig_in = 2'b00;
  logic [2:0] alarms;
  logic [1:0] page_id;
  logic alarm_clear, motor_off, modem_txd, modem_rxd, modem_ready;
  logic paging_busy, page_sent, comm_error;
  logic mute;
  int n_init, n_dest, n_text, n_bad, n_sms, n_ignored;
  int checks = 0, failures = 0;
  int cyc = 0;

  // motor model
  int  motor = 0;
  int  dip = 0;
  bit  sensor_fail = 0;
  int  mcnt = 0;

  // mechanism counters
  int m_init_retry = 0, m_modem_ready = 0, m_tracking = 0, m_surge_rejected = 0;
  int m_alarm = 0, m_shutdown = 0, m_page = 0, m_rearm = 0, m_comm_error = 0;
  int m_dig_glitch = 0, m_dig_alarm = 0;
  int n_page_pulses = 0;
  int last_page_id = -1;

  paging_controller_top #(
    .CLK_HZ(32_000_000), .BAUD(1_000_000), .SAMPLE_CYC(T), .RESP_TIMEOUT_CYC(20000),
    .CTRL_CYC(CC), .DIG_PERSIST_CYC(3000)
  ) dut (
    .clk, .rst_n, .ref_speed, .act_speed, .dig_in, .alarm_clear, .drive, .motor_off, .alarms, .page_id,
    .modem_txd, .modem_rxd, .modem_ready, .paging_busy, .page_sent, .comm_error);

  gsm_modem_model #(.BIT_CYC(BIT_CYC)) modem (
    .clk, .rxd(modem_txd), .txd(modem_rxd), .mute,
    .n_init, .n_dest, .n_text, .n_bad, .n_sms, .n_ignored);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && page_sent) begin
      n_page_pulses <= n_page_pulses + 1;
      last_page_id  <= int'(page_id);
    end
    if (mcnt == CC - 1) begin
      mcnt <= 0;
      motor <= motor + (int'(drive) - motor) / 4;
    end else mcnt <= mcnt + 1;
  end
  always_comb begin
    int a;
    a = sensor_fail ? 0 : motor - dip;
    act_speed = (a < 0) ? 8'd0 : (a > 255) ? 8'd255 : 8'(a);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cond_ready(int max);
    int n = 0;
    while (!modem_ready && n < max) begin @(negedge clk); n++; end
  endtask

  initial begin
    int t0, n0, s0, t_rst;
    ref_speed = 0; alarm_clear = 0; mute = 1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    t_rst = cyc;
    // --- initialisation: first command ignored, second answered
    wait (modem.n_init == 1);
    @(negedge clk); mute = 0;
    wait_cond_ready(200000);
    check(modem_ready, "modem initialised");
    check(n_init == 2, $sformatf("text-mode command sent twice (%0d)", n_init));
    if (n_init == 2 && modem_ready) begin m_init_retry++; m_modem_ready++; end
    // --- normal operation: reference 100, slow changes
    ref_speed = 100;
    repeat (15 * T) @(negedge clk);
    check(!motor_off, "no alarm while tracking");
    check(act_speed >= 95 && act_speed <= 105, $sformatf("speed tracks reference (%0d)", act_speed));
    ref_speed = 110;
    repeat (10 * T) @(negedge clk);
    check(!motor_off && act_speed >= 105 && act_speed <= 115, $sformatf("tracks new reference (%0d)", act_speed));
    if (!motor_off) m_tracking++;
    // --- surge: a dip of 40 divisions seen by one sample only
    // samples are taken every T cycles counted from reset release
    while ((cyc - t_rst) % T != T / 2) @(negedge clk);
    dip = 40;
    repeat (T) @(negedge clk);
    dip = 0;
    repeat (6 * T) @(negedge clk);
    check(!motor_off, "single surge does not alarm");
    if (!motor_off) m_surge_rejected++;
    // --- sensor failure: alarm, shutdown, page
    n0 = n_page_pulses; s0 = n_sms;
    sensor_fail = 1; t0 = cyc;
    while (!motor_off && cyc - t0 < 3 * T) @(negedge clk);
    check(motor_off, "alarm on sensor failure");
    check(cyc - t0 <= T + 4, $sformatf("alarm within one sampling period (%0d cycles)", cyc - t0));
    if (motor_off) m_alarm++;
    repeat (2 * CC) @(negedge clk);
    check(drive == 0, "motor switched off");
    if (drive == 0) m_shutdown++;
    t0 = cyc;
    while (n_page_pulses == n0 && cyc - t0 < 200000) @(negedge clk);
    check(n_page_pulses == n0 + 1, "page_sent");
    check(n_sms == s0 + 1, "modem delivered one SMS");
    check(n_dest >= 1 && n_text >= 1 && n_bad == 0, "destination and text lines as expected");
    check(last_page_id == 0 && modem.last_text == "Hello world", "text of the speed alarm");
    if (n_page_pulses == n0 + 1) m_page++;
    repeat (10 * T) @(negedge clk);
    check(n_page_pulses == n0 + 1 && n_sms == s0 + 1, "one page per alarm");
    check(motor_off, "alarm stays latched");
    // --- re-arm: motor restarts
    sensor_fail = 0;
    @(negedge clk); alarm_clear = 1; @(negedge clk); alarm_clear = 0;
    repeat (8 * T) @(negedge clk);
    check(!motor_off && act_speed >= 105 && act_speed <= 115, $sformatf("motor runs again (%0d)", act_speed));
    if (!motor_off) m_rearm++;
    // --- digital alarm input 0 (source 1)
    n0 = n_page_pulses; s0 = n_sms;
    dig_in[0] = 1; repeat (1000) @(negedge clk); dig_in[0] = 0;
    repeat (5000) @(negedge clk);
    check(alarms == 3'b000 && !motor_off, "short digital excursion ignored");
    if (alarms == 3'b000) m_dig_glitch++;
    dig_in[0] = 1; t0 = cyc;
    while (!alarms[1] && cyc - t0 < 10000) @(negedge clk);
    check(alarms == 3'b010, "digital input alarms after its preset time");
    check(cyc - t0 >= 3000 && cyc - t0 <= 3006, $sformatf("digital alarm after %0d cycles", cyc - t0));
    repeat (2 * CC) @(negedge clk);
    check(motor_off && drive == 0, "digital alarm switches the motor off");
    t0 = cyc;
    while (n_page_pulses == n0 && cyc - t0 < 200000) @(negedge clk);
    check(n_page_pulses == n0 + 1 && last_page_id == 1, $sformatf("page for source 1 (id %0d)", last_page_id));
    check(n_sms == s0 + 1 && modem.last_text == "Alarm input 1", "text of digital source 1 delivered");
    check(alarms == 3'b010, "speed error not flagged while the motor is held off");
    if (n_page_pulses == n0 + 1 && last_page_id == 1) m_dig_alarm++;
    dig_in[0] = 0;
    @(negedge clk); alarm_clear = 1; @(negedge clk); alarm_clear = 0;
    repeat (8 * T) @(negedge clk);
    check(!motor_off && alarms == 3'b000, "running again after the digital alarm");
    // --- second failure, modem silent: communication error
    mute = 1; n0 = n_page_pulses;
    sensor_fail = 1;
    t0 = cyc;
    while (!comm_error && cyc - t0 < 400000) @(negedge clk);
    check(comm_error, "communication error after the trial limit");
    check(modem.n_ignored >= 5 + 1, $sformatf("five unanswered destination commands (%0d ignored)", modem.n_ignored));
    check(n_page_pulses == n0, "no page reported without an answer");
    repeat (100) @(negedge clk);
    check(!paging_busy, "paging idle after giving up");
    if (comm_error) m_comm_error++;
    // --- every mechanism happened
    check(m_init_retry > 0, "mechanism: initialisation retry");
    check(m_modem_ready > 0, "mechanism: modem initialised");
    check(m_tracking > 0, "mechanism: speed tracking");
    check(m_surge_rejected > 0, "mechanism: surge rejected by averaging");
    check(m_alarm > 0, "mechanism: threshold exceeded");
    check(m_shutdown > 0, "mechanism: shutdown");
    check(m_page > 0, "mechanism: SMS page");
    check(m_rearm > 0, "mechanism: re-arm");
    check(m_comm_error > 0, "mechanism: communication error");
    check(m_dig_glitch > 0, "mechanism: short digital excursion ignored");
    check(m_dig_alarm > 0, "mechanism: digital alarm paged");
    $display("mechanisms: init_retry=%0d ready=%0d tracking=%0d surge_rejected=%0d alarm=%0d shutdown=%0d page=%0d rearm=%0d comm_error=%0d dig_glitch=%0d dig_alarm=%0d",
             m_init_retry, m_modem_ready, m_tracking, m_surge_rejected, m_alarm, m_shutdown, m_page, m_rearm, m_comm_error, m_dig_glitch, m_dig_alarm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
