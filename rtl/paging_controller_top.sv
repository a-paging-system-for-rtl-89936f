// paging_controller_top: servo speed controller with an SMS paging system.
//
// The speed controller drives the motor and produces the speed error. The
// error handling module (EHM) averages that error over a moving window and,
// when the average exceeds the threshold, switches the motor off and
// interrupts the message handling unit (MHU). A digital branch of the EHM does
// the same for N_DIG on/off alarm inputs that stay away from their normal level
// longer than a preset time; SHUTDOWN_MASK says which alarm sources also switch
// the motor off. The MHU puts the GSM modem into SMS text mode at start-up;
// on each alarm it sends the destination command and that source's text over
// the serial link (baud-rate generator, transmitter, receiver), checks each of
// the modem's answers and retries on timeouts.
//
//   ref_speed, act_speed -> speed_controller -> drive
//                               | e      ^ shutdown = |(alarms & SHUTDOWN_MASK)
//                               v        |
//                              ehm ------------ alarms[0] ---> mhu <-> uart_tx/uart_rx <-> modem
//   dig_in ------------------> ehm_digital -- alarms[N_DIG:1] -^
//
// Ports: the speeds in divisions (8 bits), the digital alarm inputs, the drive
// command, `motor_off`, `alarms` (latched alarm of each source), the modem's
// serial pair, and status: `modem_ready`, `paging_busy` (a message is being
// sent), `page_sent` (one-cycle pulse per acknowledged message, `page_id`
// naming its source) and `comm_error` (a protocol step failed MAX_TRIALS
// times; sticky until reset). `alarm_clear` re-arms all alarms and restarts
// the motor. MSGS holds one text per source (source 0 first, at the least
// significant end); it must be given anew when N_DIG is changed.
//
// The partition, the EHM settings and the protocol follow the document, where
// the MHU is software on a soft processor; here it is a state machine. The
// clock (50 MHz) and the baud rate (9600) are this design's assumptions, and
// the timing constants follow from them: T = 0.4 s, response timeout 1 s. The
// number of digital inputs, their normal levels, their 1 s preset time, the
// mask and the texts of the digital sources are this design's choices. A
// speed error is not watched while another source holds the motor off, since
// it is then the expected result of the shutdown. A
// received frame with a bad stop bit is dropped (the receiver's frame-error
// pulse is left open), and the EHM's window sum stays internal.
module paging_controller_top #(
  parameter int unsigned     CLK_HZ           = 50_000_000,
  parameter int unsigned     BAUD             = 9600,
  parameter int unsigned     SAMPLE_CYC       = CLK_HZ / 5 * 2,   // T = 0.4 s
  parameter int unsigned     N_TAPS           = 5,
  parameter int unsigned     E_TH             = 10,
  parameter int unsigned     RESP_TIMEOUT_CYC = CLK_HZ,           // 1 s
  parameter int unsigned     MAX_TRIALS       = 5,
  parameter int unsigned     CTRL_CYC         = CLK_HZ / 1000,    // 1 ms
  parameter int unsigned     N_DIG            = 2,
  parameter logic [N_DIG-1:0] DIG_NORMAL      = '0,
  parameter int unsigned     DIG_PERSIST_CYC  = CLK_HZ,           // 1 s
  parameter logic [N_DIG:0]  SHUTDOWN_MASK    = '1,
  parameter logic [8*16-1:0] PHONE            = "9363665",
  parameter logic [N_DIG:0][8*40-1:0] MSGS    = {
    (8*40)'("Alarm input 2"), (8*40)'("Alarm input 1"), (8*40)'("Hello world")},
  localparam int unsigned    N_ALARM          = N_DIG + 1,
  localparam int unsigned    SEL_W            = $clog2(N_ALARM)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         ref_speed,
  input  logic [7:0]         act_speed,
  input  logic [N_DIG-1:0]   dig_in,
  input  logic               alarm_clear,
  output logic [7:0]         drive,
  output logic               motor_off,
  output logic [N_ALARM-1:0] alarms,
  output logic [SEL_W-1:0]   page_id,
  output logic       modem_txd,
  input  logic       modem_rxd,
  output logic       modem_ready,
  output logic       paging_busy,
  output logic       page_sent,
  output logic       comm_error
);

  localparam int unsigned OVERSAMPLE = 16;
  localparam int unsigned SPEED_W    = 8;
  localparam int unsigned E_W        = SPEED_W + 1;

  logic signed [E_W-1:0] e;
  logic                  speed_alarm;
  logic                  speed_hold;
  logic [N_DIG-1:0]      dig_alarm;
  logic                  tick;
  logic [7:0]            tx_data, rx_data;
  logic                  tx_valid, tx_ready, rx_valid;

  speed_controller #(.SPEED_W(SPEED_W), .CTRL_CYC(CTRL_CYC)) u_speed (
    .clk, .rst_n, .ref_speed, .act_speed, .shutdown(motor_off), .e, .drive
  );

  ehm #(.SAMPLE_CYC(SAMPLE_CYC), .N_TAPS(N_TAPS), .E_TH(E_TH), .E_W(E_W)) u_ehm (
    .clk, .rst_n, .e, .clear(speed_hold), .alarm(speed_alarm), .e_sum()
  );

  ehm_digital #(.N_DIG(N_DIG), .NORMAL(DIG_NORMAL), .PERSIST_CYC(DIG_PERSIST_CYC)) u_ehm_dig (
    .clk, .rst_n, .din(dig_in), .clear(alarm_clear), .alarm(dig_alarm)
  );

  // While another source holds the motor off, the speed error is expected and
  // is not monitored: the speed EHM is kept cleared.
  assign speed_hold = alarm_clear || (motor_off && !speed_alarm);
  assign alarms     = {dig_alarm, speed_alarm};
  assign motor_off = |(alarms & SHUTDOWN_MASK);

  mhu #(.RESP_TIMEOUT_CYC(RESP_TIMEOUT_CYC), .MAX_TRIALS(MAX_TRIALS),
        .N_ALARM(N_ALARM), .PHONE(PHONE), .MSGS(MSGS)) u_mhu (
    .clk, .rst_n, .alarm(alarms), .page_id,
    .tx_data, .tx_valid, .tx_ready, .rx_data, .rx_valid,
    .modem_ready, .busy(paging_busy), .page_sent, .comm_error
  );

  baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .OVERSAMPLE(OVERSAMPLE)) u_baud (
    .clk, .rst_n, .tick
  );

  uart_tx #(.OVERSAMPLE(OVERSAMPLE)) u_tx (
    .clk, .rst_n, .tick, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd(modem_txd)
  );

  uart_rx #(.OVERSAMPLE(OVERSAMPLE)) u_rx (
    .clk, .rst_n, .tick, .rxd(modem_rxd), .data(rx_data), .valid(rx_valid),
    .frame_err()
  );

endmodule
