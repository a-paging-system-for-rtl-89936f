// tb_uart_tx: sends bytes through the transmitter and decodes the line with an
// independent model that samples each bit in its middle. Checks the start bit,
// the eight data bits LSB first, the stop bit, the bit period (16 enable
// pulses of 3 cycles = 48 cycles) and that ready is low during a frame.
module tb_uart_tx;
  localparam int BITC = 48;
  logic clk = 0, rst_n = 0;
  logic tick, valid, ready, txd;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int div = 0;

  uart_tx #(.OVERSAMPLE(16)) dut (.clk, .rst_n, .tick, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;
  always_ff @(posedge clk) div <= (div == 2) ? 0 : div + 1;
  assign tick = (div == 2);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_decode(logic [7:0] b);
    logic [7:0] got;
    int t0, t1;
    @(negedge clk);
    check(ready, "ready when idle");
    data = b; valid = 1;
    @(negedge clk);
    valid = 0; data = $urandom;
    check(!ready, "not ready after accept");
    // find the falling start edge
    t0 = 0;
    while (txd) begin @(negedge clk); t0++; end
    check(t0 <= 4, $sformatf("start bit begins within one enable period (%0d)", t0));
    repeat (BITC / 2) @(negedge clk);
    check(txd == 0, "start bit low at mid-bit");
    for (int i = 0; i < 8; i++) begin
      repeat (BITC) @(negedge clk);
      got[i] = txd;
    end
    check(got == b, $sformatf("data %02h got %02h", b, got));
    repeat (BITC) @(negedge clk);
    check(txd == 1, "stop bit high");
    check(!ready, "busy during stop bit");
    // the stop bit ends one bit after its middle at the latest
    t1 = 0;
    while (!ready) begin @(negedge clk); t1++; end
    check(t1 <= BITC / 2 + 4, $sformatf("ready after stop bit (%0d)", t1));
  endtask

  initial begin
    valid = 0; data = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(txd == 1, "idle line high");
    send_and_decode(8'h41);
    send_and_decode(8'h0D);
    send_and_decode(8'hA5);
    send_and_decode(8'h00);
    send_and_decode(8'hFF);
    for (int k = 0; k < 10; k++) send_and_decode(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
