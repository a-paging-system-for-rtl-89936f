// tb_resp_detect: feeds byte sequences into the answer detector and counts the
// OK and prompt pulses against the expected counts: "\r\nOK\r\n", "Ok", "ok",
// a split "O x K" (no OK), "> ", echo text containing neither, and an 'O'
// followed by clear and then 'K' (no OK).
module tb_resp_detect;
  logic clk = 0, rst_n = 0;
  logic clear, rx_valid, ok_seen, prompt_seen;
  logic [7:0] rx_data;
  int n_ok = 0, n_pr = 0;
  int checks = 0, failures = 0;

  resp_detect dut (.clk, .rst_n, .clear, .rx_data, .rx_valid, .ok_seen, .prompt_seen);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ok_seen) n_ok <= n_ok + 1;
    if (prompt_seen) n_pr <= n_pr + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(string s, int want_ok, int want_pr);
    int o0, p0;
    o0 = n_ok; p0 = n_pr;
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk); rx_data = s[i]; rx_valid = 1;
      @(negedge clk); rx_valid = 0; rx_data = 8'h4F;   // idle data must not count
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    check(n_ok - o0 == want_ok, $sformatf("'%s': %0d OK, want %0d", s, n_ok - o0, want_ok));
    check(n_pr - p0 == want_pr, $sformatf("'%s': %0d prompts, want %0d", s, n_pr - p0, want_pr));
  endtask

  initial begin
    clear = 0; rx_valid = 0; rx_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    feed("\r\nOK\r\n", 1, 0);
    feed("Ok", 1, 0);
    feed("ok", 1, 0);
    feed("OxK", 0, 0);
    feed("\r\n> ", 0, 1);
    feed("AT+CMGF=1\r", 0, 0);
    feed("+CMGS: 12\r\n\r\nOK\r\n", 1, 0);
    feed("KO", 0, 0);
    feed("OOK>OK", 2, 1);
    // 'O', clear, 'K': the pair must not count
    feed("O", 0, 0);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    feed("K", 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
