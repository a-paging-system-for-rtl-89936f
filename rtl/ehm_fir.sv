// ehm_fir: moving-window averaging filter of the error handling module.
//
// An N_TAPS-tap FIR filter with equal taps: it keeps the last N_TAPS samples of
// the signed error in a shift register and a running sum of them. On every
// `sample_en` the newest sample enters, the oldest leaves, and the sum is
// updated by adding the one and subtracting the other. The output is the sum,
// i.e. N_TAPS times the window average; the comparator after it scales its
// threshold by N_TAPS instead of dividing, which is exact. `clear` empties the
// window (all samples zero).
//
// Timing: `sum` includes a sample one cycle after its `sample_en`.
// The window of N_TAPS samples follows the document; equal taps, the running-sum
// form and returning the sum rather than the quotient are this design's choices.
module ehm_fir #(
  parameter int unsigned N_TAPS = 5,
  parameter int unsigned E_W    = 9,
  localparam int unsigned SUM_W = E_W + $clog2(N_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    sample_en,
  input  logic signed [E_W-1:0]   e_in,
  output logic signed [SUM_W-1:0] sum
);

  logic signed [E_W-1:0] taps [N_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) taps[i] <= '0;
      sum <= '0;
    end else if (clear) begin
      for (int i = 0; i < N_TAPS; i++) taps[i] <= '0;
      sum <= '0;
    end else if (sample_en) begin
      taps[0] <= e_in;
      for (int i = 1; i < N_TAPS; i++) taps[i] <= taps[i-1];
      sum <= sum + SUM_W'(e_in) - SUM_W'(taps[N_TAPS-1]);
    end
  end

endmodule
