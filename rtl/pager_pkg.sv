// pager_pkg: constants and types shared by the SMS paging blocks.
//
// Holds the character codes of the AT command protocol (carriage return ends a
// command line, Ctrl-Z ends a message text, '>' is the modem's text prompt),
// the numbering of the three transmitted lines kept in the message store, and
// the state type of the message handling sequencer. The codes are the standard
// ASCII values named by the protocol; the line numbering and the state encoding
// are this design's own choices.
package pager_pkg;

  localparam logic [7:0] CH_CR     = 8'h0D;  // command line terminator
  localparam logic [7:0] CH_CTRL_Z = 8'h1A;  // message text terminator
  localparam logic [7:0] CH_PROMPT = 8'h3E;  // '>' : modem waits for the text
  localparam logic [7:0] CH_QUOTE  = 8'h22;

  // The three lines the message handling unit sends, one per protocol step.
  typedef enum logic [1:0] {
    LINE_INIT = 2'd0,  // AT+CMGF=1<CR>          : select SMS text mode
    LINE_DEST = 2'd1,  // AT+CMGS="<number>"<CR> : destination phone number
    LINE_TEXT = 2'd2   // <text><CTRL-Z>         : message body
  } line_e;

  // Answer the modem gives when a line was received correctly.
  typedef enum logic {
    RESP_OK     = 1'b0,
    RESP_PROMPT = 1'b1
  } resp_e;

  // States of the message handling sequencer.
  typedef enum logic [1:0] {
    MHU_IDLE = 2'd0,  // initialised, waiting for an alarm
    MHU_SEND = 2'd1,  // sending the characters of the current line
    MHU_WAIT = 2'd2   // waiting for the modem's answer or the timeout
  } mhu_state_e;

  // Answer expected after each line.
  function automatic resp_e expected_resp(line_e l);
    return (l == LINE_DEST) ? RESP_PROMPT : RESP_OK;
  endfunction

endpackage
