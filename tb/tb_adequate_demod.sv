// tb_adequate_demod: end-to-end test of the adequate demodulator at its
// default parameters.
//
// A transmitter model inside the testbench spreads random 4-bit symbols into
// IEEE 802.15.4 chip sequences (table written out below, independent of the
// design's own table generator), shapes them as O-QPSK half-sine pulses at 8
// samples per rail chip (Q half a chip after I) and quantises them to 12 bits
// at 40 % of full scale. The stream runs through:
//   1. the eight operating modes, each for several symbols,
//   2. all 44 (DIA,BCA,BFA) configurations through the direct input,
//   3. mode 0 again with added uniform noise.
// Configurations change only at symbol boundaries; the symbol during which a
// change happens is not checked. Every other symbol must decode to the one
// sent, with the full correlation score (32 with the I chain on, 16 with it
// off) when there is no noise, and symbols must arrive every 128 clocks
// (16 chip pairs x 8 samples). It also counts how often each mechanism was
// exercised (comparator per chain, each filter bypass per chain, each I-delay
// value, I chain discarded, mode switches) and fails if one never occurred.
module tb_adequate_demod;

  import demod_pkg::*;

  localparam int OFF    = 4;      // first I sample of chip pair 0
  localparam int AMP    = 819;    // 40 % of 2047
  localparam int NSYM   = 8*6 + 44*4 + 12;
  localparam int WATCHDOG = 200000;

  // IEEE 802.15.4 2.4 GHz chip sequences, c0 leftmost
  localparam logic [31:0] STD_CHIPS [16] = '{
    32'b11011001110000110101001000101110, 32'b11101101100111000011010100100010,
    32'b00101110110110011100001101010010, 32'b00100010111011011001110000110101,
    32'b01010010001011101101100111000011, 32'b00110101001000101110110110011100,
    32'b11000011010100100010111011011001, 32'b10011100001101010010001011101101,
    32'b10001100100101100000011101111011, 32'b10111000110010010110000001110111,
    32'b01111011100011001001011000000111, 32'b01110111101110001100100101100000,
    32'b00000111011110111000110010010110, 32'b01100000011101111011100011001001,
    32'b10010110000001110111101110001100, 32'b11001001011000000111011110111000};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]          mode;
  logic                cfg_sel;
  cfg_t                cfg_in;
  logic                in_valid;
  logic signed [11:0]  i_in, q_in;
  logic                sym_sync, chip_valid, sym_valid;
  logic [3:0]          sym;
  logic signed [6:0]   peak;
  cfg_t                cfg_active;

  adequate_demod dut (
    .clk, .rst_n, .mode, .cfg_sel, .cfg_in, .in_valid, .i_in, .q_in,
    .sym_sync, .chip_valid, .sym_valid, .sym, .peak, .cfg_active
  );

  int checks = 0, failures = 0;
  logic [3:0] tx_sym [NSYM];
  bit         skip_sym [NSYM];
  bit         noisy_sym [NSYM];
  bit         ioff_sym [NSYM];
  int         noise_amp = 0;

  // half-sine pulse sample j (0..7) of one rail chip, scaled to AMP
  function automatic int pulse(int j);
    return int'($rtoi(AMP * $sin(3.14159265358979 * (j + 0.5) / 8.0) + 0.5));
  endfunction

  function automatic int rail_sample(int n, int rail);
    int t, p, j, s, k;
    logic c;
    t = n - OFF - 4*rail;
    if (t < 0) return 0;
    p = t / 8;  j = t % 8;
    s = p / 16; k = p % 16;
    if (s >= NSYM) return 0;
    c = STD_CHIPS[tx_sym[s]][31 - (2*k + rail)];
    return c ? pulse(j) : -pulse(j);
  endfunction

  function automatic logic signed [11:0] sat12(int v);
    if (v > 2047)  return 12'sd2047;
    if (v < -2048) return -12'sd2048;
    return 12'(v);
  endfunction

  function automatic int noise();
    if (noise_amp == 0) return 0;
    return int'($urandom_range(2*noise_amp, 0)) - noise_amp;
  endfunction

  // ---------------- schedule ----------------
  typedef struct { logic sel; logic [2:0] mode; cfg_t cfg; int nsym; bit noisy; } seg_t;
  seg_t segs [$];

  initial begin
    seg_t sg;
    for (int m = 0; m < 8; m++) begin
      sg = '{sel: 1'b0, mode: 3'(m), cfg: '0, nsym: 6, noisy: 1'b0};
      segs.push_back(sg);
    end
    for (int d = 0; d < 2; d++)
      for (int b = 0; b < 4; b++)
        for (int f = 0; f < 8; f++) begin
          if (f == 4) continue;
          if (d == 1 && f > 3) continue;
          sg = '{sel: 1'b1, mode: 3'd0, cfg: '{dia: dia_e'(d), bca: bca_e'(b), bfa: bfa_e'(f)},
                 nsym: 4, noisy: 1'b0};
          segs.push_back(sg);
        end
    sg = '{sel: 1'b0, mode: 3'd0, cfg: '0, nsym: 12, noisy: 1'b1};
    segs.push_back(sg);
  end

  // ---------------- mechanism counters ----------------
  int n_bca_i, n_bca_q, n_byp_i1, n_byp_i2, n_byp_q1, n_byp_q2, n_ioff, n_switch;
  int n_d [5];
  int n_mode_ok [8];
  int n_cfg_seen;

  always @(posedge clk) if (rst_n) begin
    if (dut.ictl.bca_en && dut.ictl.chain_en) n_bca_i++;
    if (dut.qctl.bca_en)  n_bca_q++;
    if (dut.ictl.byp1 && dut.ictl.chain_en) n_byp_i1++;
    if (dut.ictl.byp2 && dut.ictl.chain_en) n_byp_i2++;
    if (dut.qctl.byp1)    n_byp_q1++;
    if (dut.qctl.byp2)    n_byp_q2++;
    if (!dut.ictl.chain_en) n_ioff++;
    if (dut.ictl.chain_en && dut.d_sel <= 3'd4) n_d[dut.d_sel]++;
  end

  // ---------------- stimulus ----------------
  int n = 0;          // input sample index
  int seg_idx = 0, seg_end_sym = 0, cur_seg_start = 0;
  int ticks = 0;

  assign sym_sync = chip_valid && (ticks == 1);

  initial begin
    int s0;
    for (int s = 0; s < NSYM; s++) begin
      tx_sym[s] = 4'($urandom_range(15, 0));
      skip_sym[s] = 1'b0; noisy_sym[s] = 1'b0; ioff_sym[s] = 1'b0;
    end
    // mark symbols per segment (segments are built at time 0 as well)
    #1;
    s0 = 0;
    foreach (segs[g]) begin
      if (g > 0) skip_sym[s0] = 1'b1;
      for (int s = s0; s < s0 + segs[g].nsym && s < NSYM; s++) begin
        noisy_sym[s] = segs[g].noisy;
        ioff_sym[s]  = segs[g].sel && (segs[g].cfg.dia == IOFF);
      end
      s0 += segs[g].nsym;
    end
    if (s0 != NSYM) $fatal(1, "schedule length %0d != NSYM %0d", s0, NSYM);

    mode = segs[0].mode; cfg_sel = segs[0].sel; cfg_in = segs[0].cfg;
    in_valid = 1'b0; i_in = '0; q_in = '0;
    seg_end_sym = segs[0].nsym;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  // one sample per clock after reset; configuration switches at sample
  // OFF + 128*j + 8, right after the last chip pair of symbol j-1 was taken
  always @(posedge clk) if (rst_n) begin
    noise_amp = noisy_sym[((n - OFF) / 128) < NSYM && n >= OFF ? (n - OFF) / 128 : 0] ? 150 : 0;
    in_valid <= 1'b1;
    i_in     <= sat12(rail_sample(n, 0) + noise());
    q_in     <= sat12(rail_sample(n, 1) + noise());
    if (n == OFF + 128*seg_end_sym + 8 && seg_idx + 1 < segs.size()) begin
      seg_idx++;
      mode    <= segs[seg_idx].mode;
      cfg_sel <= segs[seg_idx].sel;
      cfg_in  <= segs[seg_idx].cfg;
      seg_end_sym += segs[seg_idx].nsym;
      n_switch++;
    end
    n++;
  end

  // ---------------- checking ----------------
  int rx_cnt = 0;
  longint last_sym_cycle = -1, cycle = 0;
  cfg_t cfg_at_sym;

  always @(posedge clk) begin
    cycle++;
    if (chip_valid && rst_n) ticks++;
    if (sym_valid && rst_n) begin
      if (last_sym_cycle >= 0) begin
        checks++;
        if (cycle - last_sym_cycle != 128) begin
          failures++;
          $display("FAIL: symbol spacing %0d cycles, expected 128", cycle - last_sym_cycle);
        end
      end
      last_sym_cycle = cycle;
      if (rx_cnt < NSYM && !skip_sym[rx_cnt]) begin
        checks++;
        if (sym != tx_sym[rx_cnt]) begin
          failures++;
          $display("FAIL: symbol %0d decoded %0d sent %0d cfg=%p peak=%0d", rx_cnt, sym,
                   tx_sym[rx_cnt], cfg_active, peak);
        end
        // I delay must equal 4 samples plus the group delay the I chain
        // saves (PF1: 1 sample, PF2: 3 samples) minus what the Q chain saves
        if (cfg_active.dia == ION) begin
          int exp_d;
          exp_d = 4;
          if (cfg_active.bfa[0]) exp_d += cfg_active.bfa[2] ? 0 : -1;
          if (cfg_active.bfa[1]) exp_d += cfg_active.bfa[2] ? 0 : -3;
          checks++;
          if (int'(dut.d_sel) != exp_d) begin
            failures++;
            $display("FAIL: I delay %0d expected %0d cfg=%p", dut.d_sel, exp_d, cfg_active);
          end
        end
        if (!noisy_sym[rx_cnt]) begin
          checks++;
          if (peak != (ioff_sym[rx_cnt] ? 7'sd16 : 7'sd32)) begin
            failures++;
            $display("FAIL: symbol %0d peak %0d cfg=%p", rx_cnt, peak, cfg_active);
          end
        end
        if (!cfg_sel && sym == tx_sym[rx_cnt]) n_mode_ok[mode]++;
        if (cfg_sel && sym == tx_sym[rx_cnt]) n_cfg_seen++;
      end
      rx_cnt++;
    end
  end

  task automatic need(string what, int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else
      $display("  %-28s %0d", what, cnt);
  endtask

  initial begin
    wait (rx_cnt == NSYM);
    repeat (4) @(posedge clk);
    $display("mechanism counts:");
    need("BCA active, I chain", n_bca_i);
    need("BCA active, Q chain", n_bca_q);
    need("PF1 bypassed, I chain", n_byp_i1);
    need("PF2 bypassed, I chain", n_byp_i2);
    need("PF1 bypassed, Q chain", n_byp_q1);
    need("PF2 bypassed, Q chain", n_byp_q2);
    need("I chain discarded (IOFF)", n_ioff);
    need("I delay 4", n_d[4]);
    need("I delay 3", n_d[3]);
    need("I delay 1", n_d[1]);
    need("I delay 0", n_d[0]);
    need("configuration switches", n_switch);
    need("direct-config symbols ok", n_cfg_seen);
    for (int m = 0; m < 8; m++) need($sformatf("mode %0d symbols ok", m), n_mode_ok[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d symbols received", rx_cnt, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
