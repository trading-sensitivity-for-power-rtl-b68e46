// tb_sensitivity: workload run of the adequate demodulator, at default
// parameters, in the spirit of the published evaluation.
//
// Random symbols are spread with the IEEE 802.15.4 chip table, shaped as
// O-QPSK half-sine pulses (8 samples per rail chip, Q half a chip after I),
// scaled to 40 % of the 12-bit range, given white Gaussian noise at a set
// per-sample SNR (signal power A^2/2 per rail against the noise variance),
// and quantised to 12 bits. Each of the eight operating modes is run as a
// stream of its own, after a reset, with the transmitter timing chosen so
// that chips are sampled at their centre in that mode (ideal chip timing
// recovery): bypassing PF1 moves the sampling point 1 sample later and
// bypassing PF2 3 samples later, so the stream starts that much earlier.
// The same is done for (IOFF, CB, FA), the I chain discarded, through the
// direct configuration input (printed as row "ioff"). Per run:
//   * a sweep of SNR points (SWEEP_SYMS symbols each) measures the symbol
//     error rate, printed as a table;
//   * one maximum-length packet (133 octets = 266 symbols) at 10 dB SNR
//     must decode without a single error.
// Checks: every packet symbol is right; symbols arrive every 128 clocks;
// for every mode the error count at the highest sweep SNR is no larger than
// at the lowest; summed over the sweep, mode 7 makes at least as many errors
// as mode 0 (less sensitivity for less power). The first symbol after each
// SNR change is not counted.
module tb_sensitivity;

  import demod_pkg::*;

  localparam int AMP        = 819;
  localparam int NSNR       = 6;
  localparam int SNR_DB [NSNR] = '{-10, -7, -4, -1, 2, 5};
  localparam int SWEEP_SYMS = 500;
  localparam int PKT_SYMS   = 266;
  localparam int PER_MODE   = NSNR * (SWEEP_SYMS + 1) + PKT_SYMS + 1;
  localparam int NSYM       = PER_MODE + 2;
  localparam int WATCHDOG = 9 * (NSYM * 128 + 100);
  // start of the first I chip per mode: 4 minus the Q-chain delay removed
  // by the mode's bypasses (modes 3..6 bypass PF1, mode 7 PF1 and PF2),
  // plus one whole chip for mode 7 so chip pair 0 keeps its strobe
  localparam int MODE_OFF [9] = '{4, 4, 4, 3, 3, 3, 3, 8, 4};
  localparam int NRUN = 9;   // modes 0..7, then (IOFF, CB, FA)

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
  logic                in_valid, sym_sync, chip_valid, sym_valid;
  logic signed [11:0]  i_in, q_in;
  logic [3:0]          sym;
  logic signed [6:0]   peak;
  cfg_t                cfg_active;

  adequate_demod dut (
    .clk, .rst_n, .mode, .cfg_sel, .cfg_in, .in_valid, .i_in, .q_in,
    .sym_sync, .chip_valid, .sym_valid, .sym, .peak, .cfg_active
  );

  int checks = 0, failures = 0;

  // per-symbol schedule
  logic [3:0] tx_sym   [NSYM];
  int         sch_mode [NSYM];
  int         sch_snr  [NSYM];    // index into SNR_DB, or -1 for the packet
  bit         counted  [NSYM];
  real        sigma    [NSYM];
  int         pulse    [8];
  int         OFF;
  int         cur_mode;
  bit         running = 1'b0;

  int errs [9][NSNR];
  int syms [9][NSNR];
  int pkt_errs [9];
  int pkt_syms [9];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int rail_sample(int n, int rail);
    int t, p, s, k;
    t = n - OFF - 4*rail;
    if (t < 0) return 0;
    p = t / 8; s = p / 16; k = p % 16;
    if (s >= NSYM) return 0;
    return STD_CHIPS[tx_sym[s]][31 - (2*k + rail)] ? pulse[t % 8] : -pulse[t % 8];
  endfunction

  function automatic logic signed [11:0] quant(real v);
    int r;
    r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (r > 2047)  r = 2047;
    if (r < -2048) r = -2048;
    return 12'(r);
  endfunction

  task automatic build_schedule();
    int s;
    s = 0;
    for (int q = 0; q < NSNR; q++)
      for (int k = 0; k <= SWEEP_SYMS; k++) begin
        sch_snr[s] = q; counted[s] = (k != 0); s++;
      end
    for (int k = 0; k <= PKT_SYMS; k++) begin
      sch_snr[s] = -1; counted[s] = (k != 0); s++;
    end
    while (s < NSYM) begin sch_snr[s] = -1; counted[s] = 1'b0; s++; end
    for (int j = 0; j < NSYM; j++) begin
      real snr_db;
      tx_sym[j] = 4'($urandom_range(15, 0));
      sch_mode[j] = cur_mode;
      snr_db = (sch_snr[j] < 0) ? 10.0 : real'(SNR_DB[sch_snr[j]]);
      sigma[j] = $sqrt((real'(AMP) * AMP / 2.0) / $pow(10.0, snr_db / 10.0));
    end
  endtask

  // stimulus: one sample per clock while a mode's stream is running
  int n = 0;
  always @(posedge clk) if (rst_n && running) begin
    int sj;
    sj = (n >= OFF) ? (n - OFF) / 128 : 0;
    if (sj >= NSYM) sj = NSYM - 1;
    in_valid <= 1'b1;
    i_in <= quant(real'(rail_sample(n, 0)) + sigma[sj] * gauss());
    q_in <= quant(real'(rail_sample(n, 1)) + sigma[sj] * gauss());
    n++;
  end

  int ticks = 0;
  assign sym_sync = chip_valid && (ticks == 1);

  int rx = 0;
  longint cycle = 0, last = -1;
  always @(posedge clk) begin
    cycle++;
    if (chip_valid && rst_n && running) ticks++;
    if (sym_valid && rst_n && running) begin
      if (last >= 0) begin
        checks++;
        if (cycle - last != 128) begin
          failures++;
          $display("FAIL: symbol spacing %0d", cycle - last);
        end
      end
      last = cycle;
      if (rx < NSYM && counted[rx]) begin
        int m;
        m = sch_mode[rx];
        if (sch_snr[rx] < 0) begin
          pkt_syms[m]++;
          checks++;
          if (sym != tx_sym[rx]) begin
            pkt_errs[m]++;
            failures++;
            $display("FAIL: mode %0d packet symbol error (sent %0d got %0d)", m, tx_sym[rx], sym);
          end
        end else begin
          syms[m][sch_snr[rx]]++;
          if (sym != tx_sym[rx]) errs[m][sch_snr[rx]]++;
        end
      end
      rx++;
    end
  end

  initial begin
    int tot0, tot7;
    for (int j = 0; j < 8; j++) pulse[j] = $rtoi(AMP * $sin(3.14159265358979 * (j + 0.5) / 8.0) + 0.5);
    in_valid = 1'b0; i_in = '0; q_in = '0; mode = '0;
    cfg_sel = 1'b0; cfg_in = '{dia: IOFF, bca: CB, bfa: FA};
    for (int m = 0; m < NRUN; m++) begin
      cur_mode = m;
      OFF = MODE_OFF[m];
      build_schedule();
      @(negedge clk);
      rst_n = 1'b0; running = 1'b0; in_valid = 1'b0;
      mode = 3'(m % 8);
      cfg_sel = (m == 8);
      n = 0; ticks = 0; rx = 0; last = -1;
      repeat (3) @(negedge clk);
      rst_n = 1'b1; running = 1'b1;
      wait (rx == NSYM);
    end
    $display("symbol error rate, %0d symbols per point, 40 %% magnitude", SWEEP_SYMS);
    $display("mode  SNR(dB): %6d %6d %6d %6d %6d %6d   packet(266 @ 10 dB)",
             SNR_DB[0], SNR_DB[1], SNR_DB[2], SNR_DB[3], SNR_DB[4], SNR_DB[5]);
    tot0 = 0; tot7 = 0;
    for (int m = 0; m < NRUN; m++) begin
      string line;
      line = (m < 8) ? $sformatf("  %0d           ", m) : "  ioff        ";
      for (int q = 0; q < NSNR; q++) begin
        line = {line, $sformatf(" %6.3f", real'(errs[m][q]) / real'(syms[m][q] > 0 ? syms[m][q] : 1))};
        if (m == 0) tot0 += errs[m][q];
        if (m == 7) tot7 += errs[m][q];
      end
      $display("%s   %0d/%0d errors", line, pkt_errs[m], pkt_syms[m]);
      checks++;
      if (errs[m][NSNR-1] > errs[m][0]) begin
        failures++;
        $display("FAIL: mode %0d more errors at high SNR than at low SNR", m);
      end
      checks++;
      if (pkt_syms[m] != PKT_SYMS) begin
        failures++;
        $display("FAIL: mode %0d packet had %0d symbols", m, pkt_syms[m]);
      end
    end
    checks++;
    if (tot7 < tot0) begin
      failures++;
      $display("FAIL: mode 7 (%0d errors) better than mode 0 (%0d errors)", tot7, tot0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d symbols", rx, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
