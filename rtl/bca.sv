// bca: Bypassable Comparator Approximation.
//
// When enabled, every sample is replaced by +C if it is zero or positive and
// by -C if it is negative, with C = 2^(W-2). For W = 12 that is 0x400 and
// 0xC00: both words carry the largest possible number of zero bits, which
// keeps the switching activity of the filters that follow low, while the
// sign (the phase information O-QPSK needs) survives. When disabled the
// sample is forwarded unchanged.
//
// Interface: enable selects approximation (1) or bypass (0); x is the input
// sample, y the output, both W-bit two's complement.
// Timing: purely combinational (a three-input multiplexer steered by the
// sign bit and the enable); the next stage registers the result.
// The mapping rule and the value of C follow the demodulator's published
// description; leaving the block unregistered is a choice of this design.
module bca #(
  parameter int unsigned W = demod_pkg::SAMPLE_W
) (
  input  logic                enable,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam logic signed [W-1:0] C_POS = W'(1) << (W - 2);
  localparam logic signed [W-1:0] C_NEG = -C_POS;

  always_comb begin
    if (!enable)       y = x;
    else if (x[W-1])   y = C_NEG;
    else               y = C_POS;
  end

endmodule
