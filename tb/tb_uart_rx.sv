// tb_uart_rx: drives serial frames into the receiver and checks the received
// bytes, the frame-error pulse for a low stop bit, that a short glitch is not
// taken as a start bit, and that valid comes about 9.5 bit periods after the
// start edge. Bit period: 16 enable pulses of 2 cycles = 32 cycles.
module tb_uart_rx;
  localparam int BITC = 32;
  logic clk = 0, rst_n = 0;
  logic tick, rxd, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int div = 0;
  int n_valid = 0, n_ferr = 0;
  logic [7:0] last_byte;
  int t_start, t_valid;
  int cyc = 0;

  uart_rx #(.OVERSAMPLE(16)) dut (.clk, .rst_n, .tick, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;
  always_ff @(posedge clk) div <= (div == 1) ? 0 : div + 1;
  assign tick = (div == 1);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin n_valid <= n_valid + 1; last_byte <= data; t_valid <= cyc; end
    if (frame_err) n_ferr <= n_ferr + 1;
  end

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

  task automatic frame(logic [7:0] b, bit stop);
    @(negedge clk);
    t_start = cyc;
    rxd = 0; repeat (BITC) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BITC) @(negedge clk); end
    rxd = stop; repeat (BITC) @(negedge clk);
    rxd = 1; repeat (BITC) @(negedge clk);
  endtask

  initial begin
    int nv, nf;
    rxd = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    begin
      logic [7:0] vals [6] = '{8'h4F, 8'h4B, 8'h3E, 8'h0D, 8'h00, 8'hFF};
      for (int k = 0; k < 6; k++) begin
        nv = n_valid;
        frame(vals[k], 1);
        check(n_valid == nv + 1, "one byte per frame");
        check(last_byte == vals[k], $sformatf("byte %02h got %02h", vals[k], last_byte));
        check(t_valid - t_start >= 9 * BITC && t_valid - t_start <= 10 * BITC,
              $sformatf("valid latency %0d cycles", t_valid - t_start));
      end
    end
    for (int k = 0; k < 10; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      nv = n_valid;
      frame(b, 1);
      check(n_valid == nv + 1 && last_byte == b, $sformatf("random byte %02h got %02h", b, last_byte));
    end
    // low stop bit: frame error, no byte
    nv = n_valid; nf = n_ferr;
    frame(8'h55, 0);
    repeat (2 * BITC) @(negedge clk);
    check(n_valid == nv, "no byte on framing error");
    check(n_ferr == nf + 1, "frame error pulse");
    // glitch shorter than half a bit
    nv = n_valid;
    @(negedge clk); rxd = 0; repeat (4) @(negedge clk); rxd = 1;
    repeat (12 * BITC) @(negedge clk);
    check(n_valid == nv, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
