// dsss_corr: DSSS correlator (chip sequence -> 4-bit symbol).
//
// An IEEE 802.15.4 2.4 GHz symbol is 32 chips c0..c31; even chips travel on
// the I rail and odd chips on the Q rail, so after demodulation one I chip
// and one Q chip arrive together every microsecond and a symbol takes 16
// such chip pairs. The correlator collects 16 pairs and scores each of the
// 16 reference sequences as sum(rx_chip * ref_chip) with ref chips mapped
// to +1/-1 and received chips in {+1, 0, -1}. The highest score wins (the
// lowest symbol number on a tie). A chip value of 0 (discarded I chain)
// contributes nothing, so with the I chain off the decision rests on the 16
// Q chips, which still tell all 16 symbols apart.
//
// Interface: chip_valid marks a chip pair (chip_i, chip_q). sync, given with
// a chip pair, declares that pair the first of a symbol (symbol timing comes
// from outside); without sync the correlator counts pairs from reset.
// sym_valid pulses for one cycle after every 16th pair with the decided
// symbol and its score (peak, -32..32).
// Timing: the decision is registered in the cycle of the 16th chip pair;
// throughput is one symbol per 16 chip pairs (62.5 ksymbol/s at 1 MHz).
// The chip table and chip-to-rail assignment are those of IEEE 802.15.4; the
// soft ternary scoring and the external sync are this design's choice.
module dsss_corr (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     chip_valid,
  input  demod_pkg::tchip_t        chip_i,
  input  demod_pkg::tchip_t        chip_q,
  input  logic                     sync,
  output logic                     sym_valid,
  output logic [3:0]               sym,
  output logic signed [6:0]        peak
);

  import demod_pkg::*;

  localparam chip_table_t REF = chip_table();

  tchip_t rx_i [16];
  tchip_t rx_q [16];
  tchip_t win_i [16];
  tchip_t win_q [16];
  logic [3:0] cnt, pair_idx;

  logic signed [6:0] score [16];
  logic signed [6:0] best_score;
  logic [3:0]        best_sym;

  // index of the incoming pair within its symbol
  assign pair_idx = sync ? 4'd0 : cnt;

  // window of the 16 most recent pairs including the incoming one; entry k
  // is chip pair k of the symbol when the incoming pair is pair 15
  always_comb begin
    for (int k = 0; k < 15; k++) begin
      win_i[k] = rx_i[k+1];
      win_q[k] = rx_q[k+1];
    end
    win_i[15] = chip_i;
    win_q[15] = chip_q;
  end

  always_comb begin
    for (int s = 0; s < 16; s++) begin
      score[s] = '0;
      for (int k = 0; k < 16; k++) begin
        score[s] += REF[s][2*k]   ? 7'(win_i[k]) : -7'(win_i[k]);
        score[s] += REF[s][2*k+1] ? 7'(win_q[k]) : -7'(win_q[k]);
      end
    end
    best_score = score[0];
    best_sym   = '0;
    for (int s = 1; s < 16; s++)
      if (score[s] > best_score) begin
        best_score = score[s];
        best_sym   = 4'(s);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) begin
        rx_i[k] <= CHIP_Z;
        rx_q[k] <= CHIP_Z;
      end
      cnt       <= '0;
      sym_valid <= 1'b0;
      sym       <= '0;
      peak      <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (chip_valid) begin
        for (int k = 0; k < 15; k++) begin
          rx_i[k] <= rx_i[k+1];
          rx_q[k] <= rx_q[k+1];
        end
        rx_i[15] <= chip_i;
        rx_q[15] <= chip_q;
        cnt      <= pair_idx + 4'd1;
        if (pair_idx == 4'd15) begin
          sym_valid <= 1'b1;
          sym       <= best_sym;
          peak      <= best_score;
        end
      end
    end
  end

endmodule
