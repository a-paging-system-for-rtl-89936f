// baud_gen: baud-rate enable generator for the serial link to the GSM modem.
//
// A modulo counter divides the system clock and emits a one-cycle enable pulse
// `tick` OVERSAMPLE times per bit period; the transmitter and receiver count
// these pulses instead of running on a second clock. The divisor is
// CLK_HZ / (BAUD * OVERSAMPLE) rounded to the nearest integer (minimum 1), so
// at the default 50 MHz and 9600 baud it is 326 and the bit rate is 0.16 % slow,
// well inside the tolerance of an asynchronous link.
//
// The document only says that a baud-rate process provides the timing of the
// serial link; the clock-enable form, the 16x oversampling and the default
// clock and baud rate are this design's choices.
//
// Timing: first tick DIV cycles after reset is released, then one every DIV cycles.
module baud_gen #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 9600,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned RAW = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned DIV = (RAW < 1) ? 1 : RAW;
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
