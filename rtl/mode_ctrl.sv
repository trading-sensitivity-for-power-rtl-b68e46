// mode_ctrl: control block of the adequate demodulator.
//
// Turns an operating mode into the settings of the three approximation
// techniques. The eight operating modes are the power/sensitivity Pareto
// set, ordered from full sensitivity to lowest power:
//   0 (ION,CB,FA)    1 (ION,CI,FA)    2 (ION,CIQ,FA)   3 (ION,CI,FQ1)
//   4 (ION,CB,FIQ1)  5 (ION,CI,FIQ1)  6 (ION,CIQ,FIQ1) 7 (ION,CIQ,FIQ3)
// With cfg_sel high, any of the 44 (DIA,BCA,BFA) configurations can be
// applied directly through cfg_in instead (an unused BFA code reads as FA;
// FIQk with the I chain off acts as FQk).
//
// From the chosen configuration it derives, per chain, the chain enable
// (input/clock gating of a discarded I chain), the comparator enable and the
// two filter bypasses, and the delay of the I-chain element D that keeps
// I aligned with a Q chain whose filters are bypassed:
//   D = 4 + (I-chain delay saved) - (Q-chain delay saved).
// qctl.chain_en is always 1 (the Q chain is never discarded); it is kept so
// both chains are driven by the same chain_ctl_t record.
// Timing: all outputs are registered; a new mode takes effect one clock
// after it is presented. Reset selects mode 0.
// The mode list is read from the published trade-off results; the direct
// configuration input and the register stage are this design's choices.
module mode_ctrl (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0]             mode,
  input  logic                   cfg_sel,
  input  demod_pkg::cfg_t        cfg_in,
  output demod_pkg::cfg_t        cfg,
  output demod_pkg::chain_ctl_t  ictl,
  output demod_pkg::chain_ctl_t  qctl,
  output logic [2:0]             i_delay
);

  import demod_pkg::*;

  cfg_t       nxt_cfg;
  chain_ctl_t nxt_i, nxt_q;

  function automatic cfg_t mode_cfg(logic [2:0] m);
    case (m)
      3'd0:    return '{dia: ION, bca: CB,  bfa: FA};
      3'd1:    return '{dia: ION, bca: CI,  bfa: FA};
      3'd2:    return '{dia: ION, bca: CIQ, bfa: FA};
      3'd3:    return '{dia: ION, bca: CI,  bfa: FQ1};
      3'd4:    return '{dia: ION, bca: CB,  bfa: FIQ1};
      3'd5:    return '{dia: ION, bca: CI,  bfa: FIQ1};
      3'd6:    return '{dia: ION, bca: CIQ, bfa: FIQ1};
      default: return '{dia: ION, bca: CIQ, bfa: FIQ3};
    endcase
  endfunction

  always_comb begin
    nxt_cfg = cfg_sel ? cfg_in : mode_cfg(mode);
    if (nxt_cfg.bfa == bfa_e'(3'd4)) nxt_cfg.bfa = FA;
    if (nxt_cfg.dia == IOFF && nxt_cfg.bfa[2]) nxt_cfg.bfa = bfa_e'({1'b0, nxt_cfg.bfa[1:0]});

    nxt_q.chain_en = 1'b1;
    nxt_q.bca_en   = (nxt_cfg.bca == CQ) || (nxt_cfg.bca == CIQ);
    nxt_q.byp1     = nxt_cfg.bfa[0];
    nxt_q.byp2     = nxt_cfg.bfa[1];

    nxt_i.chain_en = (nxt_cfg.dia == ION);
    nxt_i.bca_en   = (nxt_cfg.bca == CI) || (nxt_cfg.bca == CIQ);
    nxt_i.byp1     = nxt_cfg.bfa[2] && nxt_cfg.bfa[0];
    nxt_i.byp2     = nxt_cfg.bfa[2] && nxt_cfg.bfa[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '{dia: ION, bca: CB, bfa: FA};
      ictl    <= '{chain_en: 1'b1, bca_en: 1'b0, byp1: 1'b0, byp2: 1'b0};
      qctl    <= '{chain_en: 1'b1, bca_en: 1'b0, byp1: 1'b0, byp2: 1'b0};
      i_delay <= 3'(IQ_OFFSET);
    end else begin
      cfg     <= nxt_cfg;
      ictl    <= nxt_i;
      qctl    <= nxt_q;
      i_delay <= i_delay_for(nxt_i.byp1, nxt_i.byp2, nxt_q.byp1, nxt_q.byp2);
    end
  end

endmodule
