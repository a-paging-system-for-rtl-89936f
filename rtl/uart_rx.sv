// uart_rx: asynchronous serial receiver for the answers of the GSM modem.
//
// The line is brought into the clock domain by two flip-flops. A falling edge
// starts a frame; the start bit is confirmed half a bit later (OVERSAMPLE/2
// ticks) so a short glitch is ignored. From there every bit is sampled in its
// middle, OVERSAMPLE ticks apart: eight data bits LSB first, then the stop bit.
// When the stop bit is high the byte appears on `data` with a one-cycle `valid`
// pulse; when it is low `frame_err` pulses instead and the byte is dropped.
//
// Timing: `valid` comes in the middle of the stop bit, about 9.5 bit periods
// after the start edge. There is no receive buffer, so the reader must take the
// byte in that cycle.
//
// The document names the receiver only; frame format, sampling and the missing
// FIFO are this design's choices.
module uart_rx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned OW = $clog2(OVERSAMPLE);

  logic          rxd_m, rxd_s;
  logic          active;
  logic [3:0]    bitno;     // 0 = start, 1..8 = data, 9 = stop
  logic [OW-1:0] sub;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      bitno     <= '0;
      sub       <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (!active) begin
        if (tick && !rxd_s) begin
          active <= 1'b1;
          bitno  <= '0;
          sub    <= '0;
        end
      end else if (tick) begin
        if (bitno == 4'd0) begin
          // Wait half a bit, then check that the start bit is still low.
          if (sub == OW'(OVERSAMPLE / 2 - 1)) begin
            sub <= '0;
            if (rxd_s) active <= 1'b0;     // glitch, not a start bit
            else       bitno  <= 4'd1;
          end else begin
            sub <= sub + 1'b1;
          end
        end else if (sub == OW'(OVERSAMPLE - 1)) begin
          sub <= '0;
          if (bitno == 4'd9) begin
            active <= 1'b0;
            if (rxd_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            shreg <= {rxd_s, shreg[7:1]};
            bitno <= bitno + 1'b1;
          end
        end else begin
          sub <= sub + 1'b1;
        end
      end
    end
  end

endmodule
