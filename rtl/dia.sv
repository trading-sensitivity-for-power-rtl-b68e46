// dia: Discard of In-phase signal Approximation.
//
// In the IOFF setting the whole I chain is switched off: its input samples
// are forced to zero (input gating, so nothing in the chain toggles), and the
// correlator is handed the constant chip value 0 instead of the I chain's
// decisions, so the symbol is decided from the 16 Q chips alone. In the ION
// setting the samples and chips pass unchanged. Clock gating of the chain is
// the chain_en signal produced by mode_ctrl.
//
// Interface: i_off selects IOFF; i_in is the raw I sample, i_gated the
// sample fed to the I chain; chip_in is the I chain's chip decision,
// chip_out what the correlator receives.
// Timing: combinational.
// Input gating and the constant value for the correlator follow the
// published description; the constant (the ternary 0) is this design's
// choice.
module dia #(
  parameter int unsigned W = demod_pkg::SAMPLE_W
) (
  input  logic                  i_off,
  input  logic signed [W-1:0]   i_in,
  output logic signed [W-1:0]   i_gated,
  input  demod_pkg::tchip_t     chip_in,
  output demod_pkg::tchip_t     chip_out
);

  import demod_pkg::*;

  assign i_gated  = i_off ? '0 : i_in;
  assign chip_out = i_off ? CHIP_Z : chip_in;

endmodule
