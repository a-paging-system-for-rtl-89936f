// gsm_modem_model: behavioural model of the external GSM modem (testbench only).
//
// Receives 8N1 serial characters at BIT_CYC clock cycles per bit, gathers them
// into lines ended by carriage return or Ctrl-Z, and answers like a modem in
// SMS text mode: "AT+CMGF=1" -> OK, "AT+CMGS="<number>"" -> the '>' prompt, a
// text ended by Ctrl-Z -> "+CMGS: <n>" and OK. Commands are echoed first, as a
// modem does by default. Lines are checked against the expected number and
// text; any other line counts in n_bad and gets ERROR. While `mute` is high a
// completed line is received and counted but not answered, which makes the
// sender time out. A text is counted as a delivered SMS in n_sms only when it
// follows an accepted destination command.
module gsm_modem_model #(
  parameter int    BIT_CYC   = 32,
  parameter string PHONE     = "9363665",
  parameter string MSG       = "Hello world",     // texts the model accepts
  parameter string MSG_B     = "Alarm input 1",
  parameter string MSG_C     = "Alarm input 2",
  parameter int    REPLY_GAP = 20      // cycles between end of line and answer
) (
  input  logic clk,
  input  logic rxd,        // from the controller's transmitter
  output logic txd,        // to the controller's receiver
  input  logic mute,
  output int   n_init,
  output int   n_dest,
  output int   n_text,
  output int   n_bad,
  output int   n_sms,
  output int   n_ignored
);

  string cur = "";
  string last_text = "";    // most recent text received (without Ctrl-Z)
  string q[$];
  bit    dest_ok = 0;

  initial begin
    txd = 1;
    n_init = 0; n_dest = 0; n_text = 0; n_bad = 0; n_sms = 0; n_ignored = 0;
  end

  // Receiver: one character at a time, sampled in the middle of each bit.
  initial begin
    logic [7:0] b;
    forever begin
      @(posedge clk);
      if (rxd == 0) begin
        repeat (BIT_CYC / 2) @(posedge clk);
        if (rxd == 0) begin
          for (int i = 0; i < 8; i++) begin
            repeat (BIT_CYC) @(posedge clk);
            b[i] = rxd;
          end
          repeat (BIT_CYC) @(posedge clk);
          if (rxd == 1) begin
            cur = {cur, string'(b)};
            if (b == 8'h0D || b == 8'h1A) begin
              q.push_back(cur);
              cur = "";
            end
          end
        end
      end
    end
  end

  task automatic send_byte(logic [7:0] b);
    txd = 0; repeat (BIT_CYC) @(posedge clk);
    for (int i = 0; i < 8; i++) begin txd = b[i]; repeat (BIT_CYC) @(posedge clk); end
    txd = 1; repeat (BIT_CYC) @(posedge clk);
  endtask

  task automatic send_str(string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask

  function automatic bit is_text(string l);
    return l == {MSG, string'(8'h1A)} || l == {MSG_B, string'(8'h1A)} || l == {MSG_C, string'(8'h1A)};
  endfunction

  // Answering process.
  initial begin
    string l, body;
    forever begin
      @(posedge clk);
      if (q.size() > 0) begin
        l = q.pop_front();
        body = l.substr(0, l.len() - 2);
        if (l == "AT+CMGF=1\r")                         n_init++;
        else if (l == {"AT+CMGS=\"", PHONE, "\"\r"})    n_dest++;
        else if (is_text(l)) begin
          n_text++;
          last_text = body;
        end
        else begin
          n_bad++;
          $display("modem model: unexpected line '%s'", body);
        end
        if (mute) begin
          n_ignored++;
          dest_ok = 0;
        end else begin
          repeat (REPLY_GAP) @(posedge clk);
          if (l == "AT+CMGF=1\r") begin
            send_str({l, "\r\nOK\r\n"});
          end else if (l == {"AT+CMGS=\"", PHONE, "\"\r"}) begin
            dest_ok = 1;
            send_str({l, "\r\n> "});
          end else if (is_text(l) && dest_ok) begin
            dest_ok = 0;
            n_sms++;
            send_str("\r\n+CMGS: 17\r\n\r\nOK\r\n");
          end else begin
            send_str("\r\nERROR\r\n");
          end
        end
      end
    end
  end

endmodule
