// adequate_demod: IEEE 802.15.4 O-QPSK demodulator with an adjustable
// power/sensitivity trade-off.
//
// Two rails of 12-bit samples at 8 MHz go through:
//   I: DIA input gate -> BCA -> D (0..4 samples) -> BFA -> RZ -> DIA -> CORR
//   Q:                   BCA ->                     BFA -> RZ ->        CORR
// BCA can replace samples by +/-2^10 (comparator approximation), BFA can
// bypass either decimation filter (PF1 with down-2, PF2 with down-4), and
// DIA can switch the whole I chain off. The delay D undoes the transmitter's
// half-chip I/Q offset and also absorbs the delay lost when only Q-chain
// filters are bypassed. mode_ctrl turns an operating mode (0 = best
// sensitivity ... 7 = lowest power) or a directly given configuration into
// these settings.
//
// Interface: in_valid marks a sample pair (i_in, q_in); in the intended use
// it is high every cycle of an 8 MHz clock. chip_valid pulses once per 8
// input strobes, when a chip pair reaches the correlator; sym_sync, given
// together with chip_valid, marks that pair as the first of a symbol
// (symbol acquisition is outside this block). sym_valid/sym/peak deliver one
// symbol per 16 chip pairs. cfg_active shows the configuration in force.
// Timing: a mode change takes effect one clock after it is presented; the
// input sample n (counted from reset) contributes to the chip pair whose
// chip_valid follows input strobe 8k+7 by three clocks.
// The chain structure follows the published adequate demodulator; clock
// gating is expressed as register enables.
module adequate_demod #(
  parameter int unsigned W = demod_pkg::SAMPLE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0]            mode,
  input  logic                  cfg_sel,
  input  demod_pkg::cfg_t       cfg_in,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   i_in,
  input  logic signed [W-1:0]   q_in,
  input  logic                  sym_sync,
  output logic                  chip_valid,
  output logic                  sym_valid,
  output logic [3:0]            sym,
  output logic signed [6:0]     peak,
  output demod_pkg::cfg_t       cfg_active
);

  import demod_pkg::*;

  chain_ctl_t ictl, qctl;
  logic [2:0] d_sel;

  logic signed [W-1:0] i_gated, i_bca, i_del, i_flt, q_bca, q_flt;
  logic                i_fv, q_fv, i_cv;
  tchip_t              i_chip, i_chip_corr, q_chip;

  mode_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .mode    (mode),
    .cfg_sel (cfg_sel),
    .cfg_in  (cfg_in),
    .cfg     (cfg_active),
    .ictl    (ictl),
    .qctl    (qctl),
    .i_delay (d_sel)
  );

  // ---------------- I chain ----------------
  dia #(.W(W)) u_dia (
    .i_off    (!ictl.chain_en),
    .i_in     (i_in),
    .i_gated  (i_gated),
    .chip_in  (i_chip),
    .chip_out (i_chip_corr)
  );

  bca #(.W(W)) u_bca_i (.enable(ictl.bca_en), .x(i_gated), .y(i_bca));

  i_delay #(.W(W), .DMAX(IQ_OFFSET)) u_d (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (ictl.chain_en),
    .in_valid (in_valid),
    .d        (d_sel),
    .x        (i_bca),
    .y        (i_del)
  );

  bfa #(.W(W)) u_bfa_i (
    .clk       (clk),
    .rst_n     (rst_n),
    .chain_en  (ictl.chain_en),
    .byp1      (ictl.byp1),
    .byp2      (ictl.byp2),
    .in_valid  (in_valid),
    .x         (i_del),
    .out_valid (i_fv),
    .y         (i_flt)
  );

  rz #(.W(W)) u_rz_i (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (ictl.chain_en),
    .in_valid  (i_fv),
    .x         (i_flt),
    .out_valid (i_cv),
    .chip      (i_chip)
  );

  // ---------------- Q chain ----------------
  bca #(.W(W)) u_bca_q (.enable(qctl.bca_en), .x(q_in), .y(q_bca));

  bfa #(.W(W)) u_bfa_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .chain_en  (qctl.chain_en),
    .byp1      (qctl.byp1),
    .byp2      (qctl.byp2),
    .in_valid  (in_valid),
    .x         (q_bca),
    .out_valid (q_fv),
    .y         (q_flt)
  );

  rz #(.W(W)) u_rz_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (qctl.chain_en),
    .in_valid  (q_fv),
    .x         (q_flt),
    .out_valid (chip_valid),
    .chip      (q_chip)
  );

  // Both chains share the same decimation phase, so their chips arrive in
  // the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) i_cv == chip_valid)
    else $error("I and Q chip strobes out of step");

  dsss_corr u_corr (
    .clk        (clk),
    .rst_n      (rst_n),
    .chip_valid (chip_valid),
    .chip_i     (i_chip_corr),
    .chip_q     (q_chip),
    .sync       (sym_sync),
    .sym_valid  (sym_valid),
    .sym        (sym),
    .peak       (peak)
  );

endmodule
