// uart_tx: asynchronous serial transmitter towards the GSM modem.
//
// Sends one byte per accepted request as a frame of one start bit (0), eight
// data bits LSB first and one stop bit (1). Each bit lasts OVERSAMPLE pulses of
// the baud-rate enable `tick`. The line idles high.
//
// Interface: valid/ready. A byte is taken in the cycle where valid and ready are
// both high; ready stays low until the stop bit has been sent, so a sender that
// holds valid simply waits. Throughput is one byte per 10 bit periods.
//
// The document names the transmitter but not its frame; 8N1, the absence of a
// FIFO and the handshake are this design's choices. The handshake assertion
// below is disabled during reset with the same rst_n that resets the flops
// asynchronously; lint tools report that double use, which is intended.
module uart_tx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned OW = $clog2(OVERSAMPLE);

  logic          busy;
  logic [8:0]    shreg;     // {data, start bit} shifted out LSB first, then stop
  logic [3:0]    bitno;     // 0 = start, 1..8 = data, 9 = stop
  logic [OW-1:0] sub;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      shreg <= '1;
      bitno <= '0;
      sub   <= '0;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        busy  <= 1'b1;
        shreg <= {data, 1'b0};
        bitno <= '0;
        sub   <= '0;
      end
    end else if (tick) begin
      // The bit currently on the line is shreg[0] until bit 9 (stop).
      txd <= (bitno == 4'd9) ? 1'b1 : shreg[0];
      if (sub == OW'(OVERSAMPLE - 1)) begin
        sub <= '0;
        if (bitno == 4'd9) begin
          busy <= 1'b0;
        end else begin
          bitno <= bitno + 1'b1;
          shreg <= {1'b1, shreg[8:1]};
        end
      end else begin
        sub <= sub + 1'b1;
      end
    end
  end

  // A request must not be withdrawn before it is accepted.
  property p_valid_held;
    @(posedge clk) disable iff (!rst_n) (valid && !ready) |=> valid;
  endproperty
  assert property (p_valid_held) else $error("uart_tx: valid dropped while waiting");

endmodule
