// mhu: message handling unit - the SMS sending sequencer of the pager.
//
// It carries out the AT command protocol with the GSM modem in hardware:
//   start-up : send AT+CMGF=1<CR> (text mode) until the modem answers OK, then
//              raise `modem_ready` and wait for an alarm;
//   alarm    : send AT+CMGS="<number>"<CR> and wait for the '>' prompt, then
//              send the text of that alarm source followed by <CTRL-Z> and wait
//              for OK; `page_sent` pulses when the text has been acknowledged,
//              with `page_id` naming the source.
// Each of these three steps sends its line from msg_rom character by character
// through the transmitter, then waits up to RESP_TIMEOUT_CYC cycles for the
// expected answer (resp_detect). An answer that arrives earlier ends the step at
// once; no answer repeats the whole line. A step is tried at most MAX_TRIALS
// times; after the last failure `comm_error` is set (it stays set until reset),
// a message in progress is dropped and a failed initialisation starts over.
//
// There are N_ALARM alarm inputs, one per alarm source, each with its own text
// in msg_rom. Each input is taken on its rising edge and remembered as pending,
// so alarms that come during initialisation or while another message is being
// sent are served afterwards, lowest-numbered source first. One message is
// sent per rising edge.
//
// Interface: tx_data/tx_valid/tx_ready to the transmitter (valid held until
// accepted); rx_data/rx_valid from the receiver. `busy` is high while a message
// is being sent; `page_id` is the source of the message in progress or last
// sent.
//
// The protocol, the one-second wait and the five-trial limit follow the
// document, whose version runs as software on a soft processor. Doing it as a
// state machine, ending a step early on the answer, the behaviour after the
// trial limit, and serving several sources in a fixed order are this design's
// choices.
module mhu
  import pager_pkg::*;
#(
  parameter int unsigned                  RESP_TIMEOUT_CYC = 50_000_000,  // about 1 s at 50 MHz
  parameter int unsigned                  MAX_TRIALS       = 5,
  parameter int unsigned                  N_ALARM          = 3,
  parameter logic [8*16-1:0]              PHONE            = "9363665",
  parameter logic [N_ALARM-1:0][8*40-1:0] MSGS             = {
    (8*40)'("Alarm input 2"), (8*40)'("Alarm input 1"), (8*40)'("Hello world")},
  localparam int unsigned                 SEL_W = (N_ALARM > 1) ? $clog2(N_ALARM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_ALARM-1:0] alarm,
  output logic [SEL_W-1:0]   page_id,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       modem_ready,
  output logic       busy,
  output logic       page_sent,
  output logic       comm_error
);

  localparam int TW = (RESP_TIMEOUT_CYC > 1) ? $clog2(RESP_TIMEOUT_CYC) : 1;
  localparam int NW = $clog2(MAX_TRIALS + 1);

  mhu_state_e    state;
  line_e         line;
  logic [5:0]    idx;
  logic [TW-1:0] timer;
  logic [NW-1:0] trials;        // trials of the current step started so far
  logic          answered;      // expected answer seen since the step started
  logic [N_ALARM-1:0] pending;  // alarms waiting to be served
  logic [N_ALARM-1:0] alarm_q, rising, pend_all;
  logic [SEL_W-1:0]   cur_id, next_id;
  logic               any_pend;
  logic          det_clear;
  logic          ok_seen, prompt_seen;
  logic          rom_last;
  logic [7:0]    rom_char;

  msg_rom #(.N_MSG(N_ALARM), .PHONE(PHONE), .MSGS(MSGS)) u_rom (
    .line(line), .sel(cur_id), .idx(idx), .char_o(rom_char), .last(rom_last)
  );

  // Pending alarms, including those rising in this cycle; lowest index first.
  assign rising   = alarm & ~alarm_q;
  assign pend_all = pending | rising;
  assign any_pend = |pend_all;
  always_comb begin
    next_id = '0;
    for (int k = N_ALARM - 1; k >= 0; k--) if (pend_all[k]) next_id = SEL_W'(k);
  end
  assign page_id = cur_id;

  resp_detect u_det (
    .clk, .rst_n, .clear(det_clear), .rx_data, .rx_valid,
    .ok_seen, .prompt_seen
  );

  assign tx_data  = rom_char;
  assign tx_valid = (state == MHU_SEND);
  assign busy     = (line != LINE_INIT) && (state != MHU_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= MHU_SEND;     // start-up: initialise the modem first
      line        <= LINE_INIT;
      idx         <= '0;
      timer       <= '0;
      trials      <= NW'(1);
      answered    <= 1'b0;
      pending     <= '0;
      alarm_q     <= '0;
      cur_id      <= '0;
      det_clear   <= 1'b1;
      modem_ready <= 1'b0;
      page_sent   <= 1'b0;
      comm_error  <= 1'b0;
    end else begin
      page_sent <= 1'b0;
      det_clear <= 1'b0;
      alarm_q   <= alarm;
      pending   <= pend_all;

      // Remember the expected answer whenever it arrives during the step.
      if (!det_clear && state != MHU_IDLE &&
          ((expected_resp(line) == RESP_OK     && ok_seen) ||
           (expected_resp(line) == RESP_PROMPT && prompt_seen)))
        answered <= 1'b1;

      unique case (state)
        MHU_IDLE: begin
          if (any_pend) begin
            pending   <= pend_all & ~(N_ALARM'(1) << next_id);
            cur_id    <= next_id;
            line      <= LINE_DEST;
            idx       <= '0;
            trials    <= NW'(1);
            answered  <= 1'b0;
            det_clear <= 1'b1;
            state     <= MHU_SEND;
          end
        end

        MHU_SEND: begin
          if (tx_ready) begin                  // tx_valid is high in this state
            if (rom_last) begin
              timer <= '0;
              state <= MHU_WAIT;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end

        MHU_WAIT: begin
          if (answered) begin
            // Step succeeded: go on with the next step.
            answered  <= 1'b0;
            det_clear <= 1'b1;
            idx       <= '0;
            trials    <= NW'(1);
            unique case (line)
              LINE_INIT: begin
                modem_ready <= 1'b1;
                state       <= MHU_IDLE;
              end
              LINE_DEST: begin
                line  <= LINE_TEXT;
                state <= MHU_SEND;
              end
              default: begin
                page_sent <= 1'b1;
                line      <= LINE_INIT;
                state     <= MHU_IDLE;
              end
            endcase
          end else if (timer == TW'(RESP_TIMEOUT_CYC - 1)) begin
            // No answer in time: retransmit the step, or give up.
            det_clear <= 1'b1;
            idx       <= '0;
            if (trials == NW'(MAX_TRIALS)) begin
              comm_error <= 1'b1;
              trials     <= NW'(1);
              if (line == LINE_INIT) begin
                state <= MHU_SEND;             // keep trying to initialise
              end else begin
                line  <= LINE_INIT;            // drop this message
                state <= MHU_IDLE;
              end
            end else begin
              trials <= trials + 1'b1;
              state  <= MHU_SEND;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end

        default: state <= MHU_IDLE;
      endcase
    end
  end

endmodule
