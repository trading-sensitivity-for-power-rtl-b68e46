// pp_decim_fir: poly-phase FIR decimation filter core (used for PF1 and PF2).
//
// Computes y[n] = (sum_k h[k] * x[n-k]) >>> SHIFT for a filter of NTAPS
// taps that is decimated by M. The taps are grouped into M poly-phase
// branches (branch p holds taps p, p+M, p+2M, ...); the branch sums are
// added to form the output, which the surrounding stage samples only once
// every M input samples, so the arithmetic only has to settle at the low
// output rate. The coefficient sum is 2^SHIFT, so the output has the same
// width and scale as the input.
//
// Interface: x is the current input sample, accepted into the delay line on
// in_valid & en; en is the filter's clock enable (low when the filter is
// bypassed or its chain is discarded, so the delay line holds still);
// y is the filtered value for the current input sample (combinational from
// x and the NTAPS-1 stored samples).
// Timing: one input per in_valid; y is valid in the same cycle as x.
// The two-stage poly-phase structure and the decimation factors follow the
// demodulator's published description; tap counts and coefficients are this
// design's choice (see demod_pkg).
module pp_decim_fir #(
  parameter int unsigned W      = demod_pkg::SAMPLE_W,
  parameter int unsigned NTAPS  = demod_pkg::PF1_TAPS,
  parameter int unsigned M      = demod_pkg::PF1_M,
  parameter int unsigned SHIFT  = demod_pkg::PF1_SHIFT,
  parameter demod_pkg::coef_t COEF [NTAPS] = demod_pkg::PF1_COEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int unsigned ACC_W = W + demod_pkg::COEF_W + $clog2(NTAPS + 1);
  localparam int unsigned NBR   = (M < NTAPS) ? M : NTAPS;

  // taps[0] is the current input, taps[k] the input k samples ago
  logic signed [W-1:0]     dl [NTAPS-1];
  logic signed [W-1:0]     taps [NTAPS];
  logic signed [ACC_W-1:0] branch [NBR];
  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS - 1; i++) dl[i] <= '0;
    end else if (in_valid && en) begin
      dl[0] <= x;
      for (int i = 1; i < NTAPS - 1; i++) dl[i] <= dl[i-1];
    end
  end

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < NTAPS; k++) taps[k] = dl[k-1];
    for (int p = 0; p < NBR; p++) begin
      branch[p] = '0;
      for (int k = p; k < NTAPS; k += M)
        branch[p] += ACC_W'(COEF[k]) * ACC_W'(taps[k]);
    end
    acc = '0;
    for (int p = 0; p < NBR; p++) acc += branch[p];
    y = W'(acc >>> SHIFT);
  end

endmodule
