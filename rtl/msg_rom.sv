// msg_rom: message store of the pager.
//
// Holds, as constants, the lines the message handling unit sends to the GSM
// modem, one per step of the SMS protocol:
//   line 0  AT+CMGF=1<CR>              select SMS text mode
//   line 1  AT+CMGS="<PHONE>"<CR>      destination number
//   line 2  <MSGS[sel]><CTRL-Z>        text of alarm `sel`
// There is one text per alarm source. The phone number and the texts are
// string parameters, each right-aligned in a packed vector as a SystemVerilog
// string literal is; a length is found by skipping the leading zero bytes (at
// elaboration time for the number, by a small priority encoder for the
// selected text). The read is purely combinational: `char_o` is character
// `idx` of the addressed line, and `last` marks the line's terminator.
//
// The command syntax and the default number and first text ("Hello world")
// follow the document's worked example; keeping the lines as a
// character-indexed constant table and the texts of the other alarm sources
// are this design's choices. PHONE may hold up to 16 digits and each text up
// to 40 characters.
module msg_rom
  import pager_pkg::*;
#(
  parameter int unsigned                N_MSG = 3,
  parameter logic [8*16-1:0]            PHONE = "9363665",
  parameter logic [N_MSG-1:0][8*40-1:0] MSGS  = {
    (8*40)'("Alarm input 2"), (8*40)'("Alarm input 1"), (8*40)'("Hello world")},
  localparam int unsigned               SEL_W = (N_MSG > 1) ? $clog2(N_MSG) : 1
) (
  input  line_e            line,
  input  logic [SEL_W-1:0] sel,
  input  logic [5:0]       idx,
  output logic [7:0]       char_o,
  output logic             last
);

  function automatic int str_len16(logic [8*16-1:0] s);
    int n = 0;
    for (int i = 0; i < 16; i++) if (s[8*i +: 8] != 8'h00) n = i + 1;
    return n;
  endfunction

  localparam int PHONE_LEN = str_len16(PHONE);

  localparam logic [8*10-1:0] INIT_CMD = {"AT+CMGF=1", CH_CR};
  localparam logic [8*9-1:0]  DEST_PRE = {"AT+CMGS=", CH_QUOTE};
  localparam int              DEST_LEN = 9 + PHONE_LEN + 2;   // prefix, number, quote, CR

  logic [8*40-1:0] msg;
  logic [5:0]      msg_len;

  // Selected text and its length (index of the highest non-zero byte + 1).
  always_comb begin
    msg     = (int'(sel) < N_MSG) ? MSGS[sel] : '0;
    msg_len = '0;
    for (int k = 0; k < 40; k++) if (msg[8*k +: 8] != 8'h00) msg_len = 6'(k + 1);
  end

  always_comb begin
    int i;
    i      = int'(idx);
    char_o = 8'h00;
    last   = 1'b0;
    unique case (line)
      LINE_INIT: begin
        if (i < 10) char_o = INIT_CMD[8*(9 - i) +: 8];
        last = (i == 9);
      end
      LINE_DEST: begin
        if (i < 9)                   char_o = DEST_PRE[8*(8 - i) +: 8];
        else if (i < 9 + PHONE_LEN)  char_o = PHONE[8*(PHONE_LEN - 1 - (i - 9)) +: 8];
        else if (i == 9 + PHONE_LEN) char_o = CH_QUOTE;
        else if (i == DEST_LEN - 1)  char_o = CH_CR;
        last = (i == DEST_LEN - 1);
      end
      LINE_TEXT: begin
        if (i < int'(msg_len))       char_o = msg[8*(int'(msg_len) - 1 - i) +: 8];
        else if (i == int'(msg_len)) char_o = CH_CTRL_Z;
        last = (i == int'(msg_len));
      end
      default: ;
    endcase
  end

endmodule
