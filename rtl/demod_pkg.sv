// demod_pkg: types, constants and helper functions shared by the adequate
// O-QPSK demodulator.
//
// The configuration of the demodulator is a tuple of three independent
// approximation settings:
//   DIA  - I chain on (ION) or discarded (IOFF)
//   BCA  - comparators bypassed everywhere (CB), active in the I chain (CI),
//          active in the Q chain (CQ), or active in both (CIQ)
//   BFA  - all filters in use (FA), Q-chain filter stage 1, 2 or both
//          bypassed (FQ1/FQ2/FQ3), or the same stages bypassed in both
//          chains (FIQ1/FIQ2/FIQ3)
// Together these give 28 configurations with the I chain on and 16 with it
// off. Eight of them, the power/sensitivity Pareto set, are the operating
// modes 0..7 (see mode_ctrl).
//
// Also held here: the filter coefficients of the two poly-phase decimation
// stages, the I-chain alignment delays that follow from them, and the
// IEEE 802.15.4 2.4 GHz DSSS chip table (16 symbols x 32 chips), computed
// from symbol 0 by the standard's rules rather than stored.
package demod_pkg;

  // Sample format: 12-bit two's complement at the demodulator input.
  localparam int unsigned SAMPLE_W = 12;

  // Over-sampling: 8 MHz sampling, 1 Mchip/s per rail, so 8 samples per rail
  // chip. The transmitter delays Q by half a rail chip (4 samples), which the
  // receiver undoes by delaying I.
  localparam int unsigned SAMPLES_PER_CHIP = 8;
  localparam int unsigned IQ_OFFSET        = SAMPLES_PER_CHIP / 2;

  // Decimation factors of the two filter stages (8 MHz -> 4 MHz -> 1 MHz).
  localparam int unsigned PF1_M = 2;
  localparam int unsigned PF2_M = 4;

  // Filter taps. PF1 is a 3-tap binomial low-pass at 8 MHz, PF2 a 4-tap
  // pulse-shaped low-pass at 4 MHz; the cascade approximates the half-sine
  // chip pulse (matched filter). Coefficient sums are powers of two so each
  // stage renormalises to the sample width with a shift.
  localparam int unsigned PF1_TAPS  = 3;
  localparam int unsigned PF2_TAPS  = 4;
  localparam int unsigned PF1_SHIFT = 2;   // 1+2+1   = 4
  localparam int unsigned PF2_SHIFT = 3;   // 1+3+3+1 = 8
  localparam int unsigned COEF_W    = 4;
  typedef logic signed [COEF_W-1:0] coef_t;
  localparam coef_t PF1_COEF [PF1_TAPS] = '{4'sd1, 4'sd2, 4'sd1};
  localparam coef_t PF2_COEF [PF2_TAPS] = '{4'sd1, 4'sd3, 4'sd3, 4'sd1};

  // Group delay of each symmetric stage, in 8 MHz input samples: (taps-1)/2
  // samples at the stage's own input rate. A bypassed stage removes exactly
  // this much delay from its chain.
  localparam int unsigned PF1_GD = (PF1_TAPS - 1) * 1 / 2;          // 1
  localparam int unsigned PF2_GD = (PF2_TAPS - 1) * PF1_M / 2;      // 3

  typedef enum logic       {ION = 1'b0, IOFF = 1'b1} dia_e;
  typedef enum logic [1:0] {CB = 2'd0, CI = 2'd1, CQ = 2'd2, CIQ = 2'd3} bca_e;
  typedef enum logic [2:0] {FA   = 3'd0, FQ1  = 3'd1, FQ2  = 3'd2, FQ3 = 3'd3,
                            FIQ1 = 3'd5, FIQ2 = 3'd6, FIQ3 = 3'd7} bfa_e;

  typedef struct packed {
    dia_e dia;
    bca_e bca;
    bfa_e bfa;
  } cfg_t;

  // Per-chain control derived from a configuration.
  typedef struct packed {
    logic       chain_en;   // chain clocked and fed (I chain: 0 in IOFF)
    logic       bca_en;     // comparator approximation active
    logic       byp1;       // PF1 bypassed
    logic       byp2;       // PF2 bypassed
  } chain_ctl_t;

  // Ternary chip value handed to the correlator: +1 / -1 for a decided chip,
  // 0 for "no information" (the constant a discarded I chain delivers).
  typedef logic signed [1:0] tchip_t;
  localparam tchip_t CHIP_P = 2'sd1;
  localparam tchip_t CHIP_N = -2'sd1;
  localparam tchip_t CHIP_Z = 2'sd0;

  // Delay removed from a chain by its bypass setting.
  function automatic int unsigned bypass_saving(logic byp1, logic byp2);
    return (byp1 ? PF1_GD : 0) + (byp2 ? PF2_GD : 0);
  endfunction

  // I-chain delay that realigns I with Q: the nominal half-chip offset, plus
  // what the I chain saves, minus what the Q chain saves.
  function automatic logic [2:0] i_delay_for(logic i_byp1, logic i_byp2,
                                             logic q_byp1, logic q_byp2);
    return 3'(IQ_OFFSET + bypass_saving(i_byp1, i_byp2) - bypass_saving(q_byp1, q_byp2));
  endfunction

  // IEEE 802.15.4 (2.4 GHz O-QPSK) chip sequence of symbol 0, chip c0 first
  // (leftmost). Symbols 1..7 are symbol 0 rotated right by 4*s chips;
  // symbols 8..15 are symbols 0..7 with every odd-indexed chip inverted.
  localparam logic [31:0] CHIP_SEQ0 = 32'b1101_1001_1100_0011_0101_0010_0010_1110;

  // Chip c_i (0..31) of symbol sym (0..15).
  function automatic logic chip_of(logic [3:0] sym, int unsigned i);
    int unsigned j;
    logic c;
    j = (i + 32 - 4 * int'(sym[2:0])) % 32;
    c = CHIP_SEQ0[31 - j];
    if (sym[3] && (i % 2 == 1)) c = ~c;
    return c;
  endfunction

  // Whole chip table: bit i of entry s is chip c_i of symbol s.
  typedef logic [15:0][31:0] chip_table_t;
  function automatic chip_table_t chip_table();
    chip_table_t t;
    for (int s = 0; s < 16; s++)
      for (int i = 0; i < 32; i++)
        t[s][i] = chip_of(4'(s), i);
    return t;
  endfunction

endpackage
