// tb_speed_controller: runs the PID with an update every 4 cycles and gains
// KP=4, KI=1, KD=2, >>2 against a model kept in the testbench, with random
// reference and measured speeds. Checks the error output, the drive after each
// update (including saturation at 0 and 255 and the integrator clamp), the
// update period, and that shutdown forces the drive to 0 and clears the
// integrator.
module tb_speed_controller;
  localparam int CC = 4;
  logic clk = 0, rst_n = 0;
  logic [7:0] ref_speed, act_speed, drive;
  logic shutdown;
  logic signed [8:0] e;
  int checks = 0, failures = 0;
  int m_integ = 0, m_eprev = 0, m_drive = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  speed_controller #(.SPEED_W(8), .CTRL_CYC(CC), .KP(4), .KI(1), .KD(2), .GAIN_SHIFT(2)) dut (
    .clk, .rst_n, .ref_speed, .act_speed, .shutdown, .e, .drive);

  always #5 clk = ~clk;

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

  // Model of one update with error ev.
  task automatic model_update(int ev);
    int lim, u;
    lim = 256 * 4;
    m_integ += ev;
    if (m_integ > lim) m_integ = lim;
    if (m_integ < -lim) m_integ = -lim;
    u = 4 * ev + m_integ + 2 * (ev - m_eprev);
    u = u >>> 2;
    m_eprev = ev;
    if (u > 255) begin m_drive = 255; n_sat_hi++; end
    else if (u < 0) begin m_drive = 0; n_sat_lo++; end
    else m_drive = u;
  endtask

  initial begin
    shutdown = 0; ref_speed = 100; act_speed = 100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Control updates happen at the posedges where the internal counter wraps:
    // with reset released here, the first update is at the CC-th posedge.
    for (int k = 0; k < 400; k++) begin
      int r, a;
      r = (k < 100) ? 200 : int'($urandom_range(0, 255));
      a = (k < 100) ? 20 + k : ((k < 200) ? 255 : int'($urandom_range(0, 255)));
      ref_speed = 8'(r); act_speed = 8'(a);
      #1;
      check(int'(e) == r - a, $sformatf("error %0d want %0d", e, r - a));
      repeat (CC - 1) begin
        @(negedge clk);
        check(int'(drive) == m_drive, "drive held between updates");
      end
      @(negedge clk);
      model_update(r - a);
      check(int'(drive) == m_drive, $sformatf("update %0d: drive %0d want %0d", k, drive, m_drive));
    end
    check(n_sat_hi > 0 && n_sat_lo > 0, "both saturation limits reached");
    // shutdown
    shutdown = 1; ref_speed = 250; act_speed = 0;
    repeat (3 * CC) begin @(negedge clk); check(drive == 0, "drive 0 in shutdown"); end
    m_integ = 0; m_eprev = 0; m_drive = 0;
    shutdown = 0;
    for (int k = 0; k < 5; k++) begin
      repeat (CC) @(negedge clk);
      model_update(250);
      check(int'(drive) == m_drive, $sformatf("restart %0d: drive %0d want %0d", k, drive, m_drive));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
