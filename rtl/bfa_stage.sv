// bfa_stage: one bypassable decimation stage (filter, bypass multiplexers,
// down-sampler) of the Bypassable Filter Approximation.
//
// Input multiplexer: the filter sees the sample, or zero when bypassed
// (input gating). Filter: pp_decim_fir, whose delay line is clock-enabled
// only while the stage is in use (clock gating). Output multiplexer: the
// filtered value, or the raw sample when bypassed. Down-sampler: a register
// that keeps every M-th multiplexer output. Bypassing removes the filter's
// group delay from the chain but leaves the register timing unchanged.
//
// Interface: in_valid marks an input sample x; chain_en is low while the
// whole chain is discarded (all data registers hold); bypass selects the
// bypass path. out_valid pulses one cycle after every M-th input strobe and
// y holds the decimated sample.
// Timing: an internal modulo-M counter, reset to 0, picks input strobes
// M-1, 2M-1, ... (counted from reset); it keeps running while the chain is
// discarded so that both chains stay in the same decimation phase.
// The multiplexer/gating arrangement follows the published BFA structure;
// the counter-based decimation phase is this design's choice.
module bfa_stage #(
  parameter int unsigned W      = demod_pkg::SAMPLE_W,
  parameter int unsigned NTAPS  = demod_pkg::PF1_TAPS,
  parameter int unsigned M      = demod_pkg::PF1_M,
  parameter int unsigned SHIFT  = demod_pkg::PF1_SHIFT,
  parameter demod_pkg::coef_t COEF [NTAPS] = demod_pkg::PF1_COEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chain_en,
  input  logic                bypass,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0]       cnt;
  logic                strobe;
  logic signed [W-1:0] fir_x, fir_y, mux_y;

  assign strobe = in_valid && (int'(cnt) == M - 1);
  assign fir_x  = bypass ? '0 : x;
  assign mux_y  = bypass ? x : fir_y;

  pp_decim_fir #(.W(W), .NTAPS(NTAPS), .M(M), .SHIFT(SHIFT), .COEF(COEF)) u_pf (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (chain_en && !bypass),
    .in_valid (in_valid),
    .x        (fir_x),
    .y        (fir_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= strobe;
      if (in_valid) cnt <= (int'(cnt) == M - 1) ? '0 : cnt + 1'b1;
      if (strobe && chain_en) y <= mux_y;
    end
  end

endmodule
