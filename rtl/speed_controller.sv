// speed_controller: PID speed controller of the servo motor, with shutdown.
//
// Forms the error e = ref_speed - act_speed (signed, one bit wider than the
// speeds) continuously; the error handling module watches this output. Every
// CTRL_CYC cycles the controller updates
//   integ <= clamp(integ + e, +-INT_LIM)
//   u      = (KP*e + KI*integ + KD*(e - e_prev)) >>> GAIN_SHIFT
//   drive <= u saturated to 0 .. 2**SPEED_W-1
// While `shutdown` is high the drive is held at 0 (the motor is switched off)
// and the integrator and the previous error are cleared, so the loop restarts
// cleanly when shutdown is released.
//
// The document uses a controller from the authors' earlier work and gives only
// its role (minimise the error between reference and measured speed) and its
// shutdown input. The positional PID form, the gains, the update period, the
// anti-windup clamp and the 8-bit speed (the document's threshold of 10
// divisions being 4 % of full speed puts full speed near 250 divisions) are
// this design's choices; the gains are placeholders to be tuned for a motor.
module speed_controller #(
  parameter int unsigned SPEED_W    = 8,
  parameter int unsigned CTRL_CYC   = 50_000,   // 1 ms at 50 MHz
  parameter int          KP         = 4,
  parameter int          KI         = 1,
  parameter int          KD         = 0,
  parameter int unsigned GAIN_SHIFT = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [SPEED_W-1:0]       ref_speed,
  input  logic [SPEED_W-1:0]       act_speed,
  input  logic                     shutdown,
  output logic signed [SPEED_W:0]  e,
  output logic [SPEED_W-1:0]       drive
);

  localparam int CW      = (CTRL_CYC > 1) ? $clog2(CTRL_CYC) : 1;
  localparam int ACC_W   = 32;
  // Integrator limit: enough for full drive through the I term alone.
  localparam int INT_LIM = ((2 ** SPEED_W) << GAIN_SHIFT) / ((KI > 0) ? KI : 1);
  localparam int U_MAX   = 2 ** SPEED_W - 1;

  logic [CW-1:0]           cnt;
  logic signed [ACC_W-1:0] integ, integ_nx, e_prev, u;

  assign e = $signed({1'b0, ref_speed}) - $signed({1'b0, act_speed});

  always_comb begin
    integ_nx = integ + ACC_W'(e);
    if (integ_nx >  INT_LIM) integ_nx =  INT_LIM;
    if (integ_nx < -INT_LIM) integ_nx = -INT_LIM;
    u = (KP * ACC_W'(e) + KI * integ_nx + KD * (ACC_W'(e) - e_prev)) >>> GAIN_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      integ  <= '0;
      e_prev <= '0;
      drive  <= '0;
    end else if (shutdown) begin
      cnt    <= '0;
      integ  <= '0;
      e_prev <= '0;
      drive  <= '0;
    end else if (cnt == CW'(CTRL_CYC - 1)) begin
      cnt    <= '0;
      integ  <= integ_nx;
      e_prev <= ACC_W'(e);
      if (u > U_MAX)   drive <= SPEED_W'(U_MAX);
      else if (u < 0)  drive <= '0;
      else             drive <= SPEED_W'(u);
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
