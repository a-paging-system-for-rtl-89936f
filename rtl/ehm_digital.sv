// ehm_digital: digital-input branch of the error handling module.
//
// Watches N_DIG on/off alarm signals of the machine (door contacts, overload
// relays, limit switches and the like). Each input has its own persistence
// counter: it counts clock cycles while the input differs from its normal
// level (bit i of NORMAL) and restarts from zero whenever the input returns to
// normal. When an input has stayed abnormal for PERSIST_CYC cycles its alarm
// bit is set and latched until `clear`. Short excursions shorter than the
// preset time therefore never alarm. Inputs are synchronised with two
// flip-flops first.
//
// Timing: an input that turns abnormal at a clock edge alarms PERSIST_CYC + 3
// cycles later (2 synchroniser stages, the count, the latch).
//
// The rule (a digital signal that leaves its normal state for longer than a
// preset time raises an alarm) follows the document. The number of inputs,
// their normal levels and the preset time of 1 s (50,000,000 cycles at the
// assumed 50 MHz) are this design's choices; the document gives no values.
module ehm_digital #(
  parameter int unsigned      N_DIG       = 2,
  parameter logic [N_DIG-1:0] NORMAL      = '0,
  parameter int unsigned      PERSIST_CYC = 50_000_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_DIG-1:0] din,
  input  logic             clear,
  output logic [N_DIG-1:0] alarm
);

  localparam int CW = $clog2(PERSIST_CYC + 1);

  logic [N_DIG-1:0] d_m, d_s;
  logic [CW-1:0]    cnt [N_DIG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_m <= NORMAL;
      d_s <= NORMAL;
    end else begin
      d_m <= din;
      d_s <= d_m;
    end
  end

  for (genvar i = 0; i < N_DIG; i++) begin : g_ch
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i]   <= '0;
        alarm[i] <= 1'b0;
      end else if (clear) begin
        cnt[i]   <= '0;
        alarm[i] <= 1'b0;
      end else if (d_s[i] == NORMAL[i]) begin
        cnt[i] <= '0;
      end else if (cnt[i] == CW'(PERSIST_CYC)) begin
        alarm[i] <= 1'b1;
      end else begin
        cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

endmodule
