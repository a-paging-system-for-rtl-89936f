// resp_detect: recognises the GSM modem's acknowledgements in the received bytes.
//
// The modem answers a correctly received command line or message with "OK" and
// the destination command with the text prompt '>'. This block watches the byte
// stream from the receiver: `ok_seen` pulses for one cycle when a 'K' follows an
// 'O' directly, `prompt_seen` pulses when a '>' arrives. Letters are compared
// without regard to case, so "Ok" and "OK" both count. Every other byte
// (carriage return, line feed, echoed characters, result text) is ignored and
// breaks an O-K pair. `clear` forgets a pending 'O', so an answer cannot be made
// from bytes of two different protocol steps.
//
// Timing: the pulses come one cycle after the `rx_valid` of the deciding byte.
// The two answers are the document's; case-insensitive matching is this
// design's choice.
module resp_detect
  import pager_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       ok_seen,
  output logic       prompt_seen
);

  logic got_o;
  logic is_o, is_k;

  assign is_o = (rx_data == "O") || (rx_data == "o");
  assign is_k = (rx_data == "K") || (rx_data == "k");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_o       <= 1'b0;
      ok_seen     <= 1'b0;
      prompt_seen <= 1'b0;
    end else begin
      ok_seen     <= 1'b0;
      prompt_seen <= 1'b0;
      if (clear) begin
        got_o <= 1'b0;
      end else if (rx_valid) begin
        got_o       <= is_o;
        ok_seen     <= got_o && is_k;
        prompt_seen <= (rx_data == CH_PROMPT);
      end
    end
  end

endmodule
