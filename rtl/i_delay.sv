// i_delay: programmable sample delay of the in-phase chain (element D).
//
// An O-QPSK transmitter sends the Q rail half a rail chip after the I rail,
// so the receiver delays I by the same amount (4 samples at 8 MHz) before
// filtering. When filter stages of the Q chain are bypassed the Q samples
// reach the correlator earlier, and this same delay is shortened to keep the
// two rails aligned; the required value is supplied on d.
//
// Interface: in_valid marks an input sample; en is the chain's clock enable
// (low while the I chain is discarded); d selects the delay, 0..DMAX
// samples (0 = combinational pass-through).
// Timing: a DMAX-deep shift register advanced on in_valid & en; y is the
// sample d input strobes old.
// The delay element and its re-use for Q-bypass alignment follow the
// demodulator's published description; the tapped shift register is this
// design's choice.
module i_delay #(
  parameter int unsigned W    = demod_pkg::SAMPLE_W,
  parameter int unsigned DMAX = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  logic [2:0]          d,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] sr [DMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DMAX; i++) sr[i] <= '0;
    end else if (in_valid && en) begin
      sr[0] <= x;
      for (int i = 1; i < DMAX; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    y = x;
    for (int i = 1; i <= DMAX; i++)
      if (int'(d) == i) y = sr[i-1];
  end

endmodule
