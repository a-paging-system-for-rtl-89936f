// ehm: error handling module of the speed controller.
//
// Watches the speed error e = reference - actual. A counter takes one sample of
// e every SAMPLE_CYC clock cycles (the sampling period T); ehm_fir averages the
// last N_TAPS samples, so the averaging window is W = N_TAPS x T. A comparator
// checks the magnitude of the window average against the threshold E_TH, done
// as |sum| > N_TAPS * E_TH. Once it is exceeded `alarm` is set and stays set:
// it is the shutdown request of the speed controller and the interrupt request
// of the message handling unit. `clear` (operator re-arm) drops the alarm,
// empties the window and restarts the sampling period.
//
// Defaults: T = 0.4 s (20,000,000 cycles at 50 MHz), N_TAPS = 5 (W = 2 s) and
// E_TH = 10 speed divisions, as in the document's servo example. Comparing the
// magnitude (so both too slow and too fast alarm), the strict comparison and
// the latching of the alarm are this design's choices.
//
// Timing: the alarm is set two cycles after the sample that pushes the
// average over the threshold.
module ehm #(
  parameter int unsigned SAMPLE_CYC = 20_000_000,
  parameter int unsigned N_TAPS     = 5,
  parameter int unsigned E_TH       = 10,
  parameter int unsigned E_W        = 9,
  localparam int unsigned SUM_W     = E_W + $clog2(N_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [E_W-1:0]   e,
  input  logic                    clear,
  output logic                    alarm,
  output logic signed [SUM_W-1:0] e_sum
);

  localparam int CW = (SAMPLE_CYC > 1) ? $clog2(SAMPLE_CYC) : 1;
  localparam logic [SUM_W-1:0] LIMIT = SUM_W'(N_TAPS * E_TH);

  logic [CW-1:0]    cnt;
  logic             sample_en;
  logic [SUM_W-1:0] mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      sample_en <= 1'b0;
    end else if (clear) begin
      cnt       <= '0;
      sample_en <= 1'b0;
    end else if (cnt == CW'(SAMPLE_CYC - 1)) begin
      cnt       <= '0;
      sample_en <= 1'b1;
    end else begin
      cnt       <= cnt + 1'b1;
      sample_en <= 1'b0;
    end
  end

  ehm_fir #(.N_TAPS(N_TAPS), .E_W(E_W)) u_fir (
    .clk, .rst_n, .clear, .sample_en, .e_in(e), .sum(e_sum)
  );

  assign mag = e_sum[SUM_W-1] ? SUM_W'(-e_sum) : SUM_W'(e_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              alarm <= 1'b0;
    else if (clear)          alarm <= 1'b0;
    else if (mag > LIMIT)    alarm <= 1'b1;
  end

endmodule
