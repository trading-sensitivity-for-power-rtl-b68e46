// rz: chip decision (RZ coding) of one rail.
//
// Each 1 MHz filtered sample is turned into a ternary chip value: +1 for a
// sample that is zero or positive, -1 for a negative one. The third level,
// 0, is never produced here; it is the "return to zero" level the DIA block
// substitutes for a discarded I chain, so the correlator sees it as absence
// of information.
//
// Interface: in_valid/x from the BFA chain; en freezes the register while the
// chain is discarded. out_valid/chip follow one cycle later.
// The position of RZ coding between decimation and correlation follows the
// published architecture; its exact encoding is not specified there and the
// sign decision with a reserved zero level is this design's choice.
module rz #(
  parameter int unsigned W = demod_pkg::SAMPLE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   x,
  output logic                  out_valid,
  output demod_pkg::tchip_t     chip
);

  import demod_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      chip      <= CHIP_Z;
    end else begin
      out_valid <= in_valid;
      if (in_valid && en) chip <= x[W-1] ? CHIP_N : CHIP_P;
    end
  end

endmodule
