// bfa: Bypassable Filter Approximation chain of one rail (I or Q).
//
// Two decimation stages in series: PF1 followed by down-sampling by 2
// (8 MHz -> 4 MHz), then PF2 followed by down-sampling by 4 (4 MHz ->
// 1 MHz, one sample per rail chip). Either filter can be bypassed
// independently; a bypassed filter is input gated and clock gated, and its
// group delay (1 input sample for PF1, 3 for PF2) drops out of the chain.
//
// Interface: in_valid/x are 8 MHz samples; byp1/byp2 bypass PF1/PF2;
// chain_en low freezes all data registers (discarded I chain). out_valid
// pulses once per 8 input strobes, at input strobes 7, 15, 23, ... counted
// from reset, and y is then the decimated sample.
// Timing: out_valid follows the 8th input strobe by two clock cycles (one
// register per stage).
// Structure and decimation factors follow the published design; the filter
// coefficients (demod_pkg) are this design's choice.
module bfa #(
  parameter int unsigned W = demod_pkg::SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chain_en,
  input  logic                byp1,
  input  logic                byp2,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  import demod_pkg::*;

  logic                v1;
  logic signed [W-1:0] y1;

  bfa_stage #(.W(W), .NTAPS(PF1_TAPS), .M(PF1_M), .SHIFT(PF1_SHIFT), .COEF(PF1_COEF)) u_pf1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .chain_en  (chain_en),
    .bypass    (byp1),
    .in_valid  (in_valid),
    .x         (x),
    .out_valid (v1),
    .y         (y1)
  );

  bfa_stage #(.W(W), .NTAPS(PF2_TAPS), .M(PF2_M), .SHIFT(PF2_SHIFT), .COEF(PF2_COEF)) u_pf2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .chain_en  (chain_en),
    .bypass    (byp2),
    .in_valid  (v1),
    .x         (y1),
    .out_valid (out_valid),
    .y         (y)
  );

endmodule
