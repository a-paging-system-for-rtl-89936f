// tb_mhu: message handling unit against a byte-level model of the GSM modem
// (no serial line: the testbench takes bytes with a random ready and returns
// answers as byte strobes). Response timeout 300 cycles, 5 trials.
// Scenarios and checks:
//  - the modem ignores the first two text-mode commands: three are sent, the
//    retries start one timeout after the end of the unanswered line, then
//    modem_ready rises;
//  - an alarm: the destination command and the text are sent exactly as
//    expected and page_sent pulses once;
//  - the first text is ignored: only the text is sent again;
//  - a silent modem: the destination command is sent five times, comm_error
//    rises, no page is reported, and the unit is idle afterwards;
//  - an alarm during initialisation is served after it;
//  - alarms of sources 2 and 1 rising together: two pages, source 1 first,
//    each with its own text, page_id naming the source.
module tb_mhu;
  import pager_pkg::*;
  localparam int TO = 300;
  logic clk = 0, rst_n = 0;
  logic [2:0] alarm;
  logic [1:0] page_id;
  logic tx_valid, tx_ready, rx_valid;
  int   page_ids[$];
  logic [7:0] tx_data, rx_data;
  logic modem_ready, busy, page_sent, comm_error;
  int checks = 0, failures = 0;
  int cyc = 0;

  string lines[$];        // lines received by the modem model
  int    line_end[$];     // cycle of each line's last byte
  int    line_start[$];   // cycle of each line's first byte
  string cur = "";
  int    drop_n = 0;      // number of coming lines the model ignores
  int    drop_text = 0;   // number of coming message texts the model ignores
  int    n_page = 0;
  int    gap = 0;

  mhu #(.RESP_TIMEOUT_CYC(TO), .MAX_TRIALS(5)) dut (
    .clk, .rst_n, .alarm, .page_id, .tx_data, .tx_valid, .tx_ready, .rx_data, .rx_valid,
    .modem_ready, .busy, .page_sent, .comm_error);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Byte sink with a random ready.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && page_sent) begin n_page <= n_page + 1; page_ids.push_back(int'(page_id)); end
    if (!rst_n) begin
      tx_ready <= 1'b0; gap <= 0; cur = "";
    end else if (tx_valid && tx_ready) begin
      if (cur.len() == 0) line_start.push_back(cyc);
      cur = {cur, string'(tx_data)};
      if (tx_data == CH_CR || tx_data == CH_CTRL_Z) begin
        lines.push_back(cur); line_end.push_back(cyc); cur = "";
      end
      tx_ready <= 1'b0;
      gap <= $urandom_range(0, 4);
    end else if (gap > 0) begin
      gap <= gap - 1;
    end else begin
      tx_ready <= 1'b1;
    end
  end

  // Modem answers.
  task automatic answer(string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk); rx_data = s[i]; rx_valid = 1;
      @(negedge clk); rx_valid = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  int handled = 0;
  initial begin
    rx_valid = 0; rx_data = 0;
    forever begin
      @(negedge clk);
      if (!rst_n) handled = lines.size();
      else if (lines.size() > handled) begin
        string l;
        l = lines[handled]; handled++;
        repeat (10) @(negedge clk);
        if (drop_n > 0) drop_n--;
        else if (drop_text > 0 && l.substr(0, 1) != "AT") drop_text--;
        else if (l.substr(0, 6) == "AT+CMGF") answer("AT+CMGF=1\r\r\nOK\r\n");
        else if (l.substr(0, 6) == "AT+CMGS") answer("\r\n> ");
        else answer("\r\n+CMGS: 7\r\n\r\nOk\r\n");
      end
    end
  end

  task automatic wait_idle(int max);
    int n = 0;
    do begin @(negedge clk); n++; end while ((busy || !modem_ready) && n < max);
    repeat (20) @(negedge clk);
  endtask

  localparam string INIT = "AT+CMGF=1\r";
  localparam string DEST = "AT+CMGS=\"9363665\"\r";
  string TEXT;

  initial begin
    int base, np;
    TEXT = {"Hello world", string'(8'h1A)};
    alarm = 3'b000;
    drop_n = 2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // --- initialisation with two retries
    wait_idle(20000);
    check(modem_ready, "modem_ready after initialisation");
    check(lines.size() == 3, $sformatf("three init lines sent (%0d)", lines.size()));
    for (int i = 0; i < lines.size(); i++) check(lines[i] == INIT, "init line text");
    for (int i = 1; i < 3 && i < lines.size(); i++)
      check(line_start[i] - line_end[i-1] >= TO && line_start[i] - line_end[i-1] <= TO + 10,
            $sformatf("retry after the timeout (%0d cycles)", line_start[i] - line_end[i-1]));
    check(!comm_error, "no error after two retries");
    // --- one alarm, one page
    base = lines.size(); np = n_page;
    @(negedge clk); alarm = 3'b001; repeat (5) @(negedge clk); alarm = 3'b000;
    wait_idle(20000);
    check(lines.size() == base + 2, "two lines per page");
    if (lines.size() == base + 2) begin
      check(lines[base] == DEST, "destination command");
      check(lines[base+1] == TEXT, "message text with Ctrl-Z");
    end
    check(n_page == np + 1, "page_sent once");
    // --- text ignored once: only the text is sent again
    base = lines.size(); np = n_page;
    drop_text = 1;
    @(negedge clk); alarm = 3'b001; @(negedge clk); alarm = 3'b000;
    wait_idle(20000);
    check(lines.size() == base + 3, $sformatf("dest + text + text (%0d)", lines.size() - base));
    if (lines.size() == base + 3) check(lines[base+1] == TEXT && lines[base+2] == TEXT, "text repeated");
    check(n_page == np + 1 && !comm_error, "page after one retry");
    // --- silent modem: five trials, then communication error
    base = lines.size(); np = n_page;
    drop_n = 1000;
    @(negedge clk); alarm = 3'b001; @(negedge clk); alarm = 3'b000;
    wait_idle(50000);
    check(comm_error, "comm_error after five trials");
    check(lines.size() == base + 5, $sformatf("five destination commands (%0d)", lines.size() - base));
    for (int i = base; i < lines.size(); i++) check(lines[i] == DEST, "repeated line is the destination command");
    check(n_page == np, "no page reported");
    check(!busy, "idle after giving up");
    // --- alarm during initialisation is served afterwards
    drop_n = 1;
    rst_n = 0; repeat (3) @(negedge clk);
    lines.delete(); line_end.delete(); line_start.delete(); handled = 0;
    np = n_page;
    rst_n = 1;
    repeat (5) @(negedge clk); alarm = 3'b001; repeat (3) @(negedge clk); alarm = 3'b000;
    wait (n_page == np + 1 || cyc > 200000);
    check(n_page == np + 1, "pending alarm served after initialisation");
    check(lines.size() == 4 && lines[0] == INIT && lines[1] == INIT && lines[2] == DEST && lines[3] == TEXT,
          $sformatf("init, init, dest, text (%0d lines)", lines.size()));
    check(!comm_error, "error cleared by reset");
    // --- two sources at once
    base = lines.size(); np = n_page; page_ids.delete();
    @(negedge clk); alarm = 3'b110; repeat (3) @(negedge clk); alarm = 3'b000;
    wait (n_page == np + 2 || cyc > 400000);
    repeat (20) @(negedge clk);
    check(n_page == np + 2, "two pages for two sources");
    check(page_ids.size() == 2 && page_ids[0] == 1 && page_ids[1] == 2, "source 1 served before source 2");
    check(lines.size() == base + 4, "four lines for two pages");
    if (lines.size() == base + 4) begin
      check(lines[base] == DEST && lines[base+2] == DEST, "destination command before each text");
      check(lines[base+1] == {"Alarm input 1", string'(8'h1A)}, "text of source 1");
      check(lines[base+3] == {"Alarm input 2", string'(8'h1A)}, "text of source 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
