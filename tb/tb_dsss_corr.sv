// tb_dsss_corr: chip pairs of random symbols, taken from the IEEE 802.15.4
// chip table written out here, are fed to the correlator one pair per 8
// clocks. Cases: clean chips (peak 32), up to 5 flipped chips per symbol
// (still decoded), the I rail replaced by 0 (decision from Q alone, peak 16),
// and a re-synchronisation in mid-stream after garbage pairs. Every symbol
// must decode and the outputs must come one per 16 pairs.
module tb_dsss_corr;

  import demod_pkg::*;

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

  logic       chip_valid, sync, sym_valid;
  tchip_t     chip_i, chip_q;
  logic [3:0] sym;
  logic signed [6:0] peak;
  int checks = 0, failures = 0;

  dsss_corr dut (.clk, .rst_n, .chip_valid, .chip_i, .chip_q, .sync, .sym_valid, .sym, .peak);

  int     n_valid = 0;
  longint cycle = 0, last = -1;
  always @(posedge clk) begin
    cycle++;
    if (sym_valid) begin
      n_valid++;
      last = cycle;
    end
  end

  // send one symbol; nflip chips inverted at random positions; i_zero drops I
  task automatic send(logic [3:0] s, int nflip, bit i_zero, bit first, int exp_peak);
    logic [31:0] c;
    longint t0;
    c = STD_CHIPS[s];
    for (int f = 0; f < nflip; f++) c[$urandom_range(31, 0)] ^= 1'b1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      chip_valid = 1'b1;
      sync   = first && (k == 0);
      chip_i = i_zero ? CHIP_Z : (c[31 - 2*k]     ? CHIP_P : CHIP_N);
      chip_q =                   (c[31 - 2*k - 1] ? CHIP_P : CHIP_N);
      @(negedge clk);
      chip_valid = 1'b0; sync = 1'b0;
      if (k == 15) t0 = cycle;
      repeat (6) @(negedge clk);
    end
    // result was registered on the clock after the 16th pair
    checks++;
    if (last != t0 + 1) begin
      failures++;
      $display("FAIL: no symbol output after 16th pair (last=%0d t0=%0d)", last, t0);
    end
    checks++;
    if (sym != s) begin
      failures++;
      $display("FAIL: sent %0d decoded %0d (flips %0d, i_zero %0d) peak %0d", s, sym, nflip, i_zero, peak);
    end
    if (exp_peak > -100) begin
      checks++;
      if (int'(peak) != exp_peak) begin
        failures++;
        $display("FAIL: symbol %0d peak %0d expected %0d", s, peak, exp_peak);
      end
    end
  endtask

  initial begin
    chip_valid = 1'b0; sync = 1'b0; chip_i = CHIP_Z; chip_q = CHIP_Z;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // a few pairs of garbage so the reset phase is not the symbol phase
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) chip_valid = 1'b1; chip_i = CHIP_P; chip_q = CHIP_N;
      @(negedge clk) chip_valid = 1'b0;
    end
    for (int s = 0; s < 16; s++) send(4'(s), 0, 1'b0, s == 0, 32);
    for (int t = 0; t < 40; t++)  send(4'($urandom_range(15, 0)), 0, 1'b0, 1'b0, 32);
    for (int t = 0; t < 60; t++)  send(4'($urandom_range(15, 0)), 5, 1'b0, 1'b0, -1000);
    for (int s = 0; s < 16; s++)  send(4'(s), 0, 1'b1, 1'b0, 16);
    // lose sync with 7 stray pairs, then resynchronise
    for (int k = 0; k < 7; k++) begin
      @(negedge clk) chip_valid = 1'b1; chip_i = CHIP_N; chip_q = CHIP_N;
      @(negedge clk) chip_valid = 1'b0;
    end
    for (int t = 0; t < 20; t++)  send(4'($urandom_range(15, 0)), 0, 1'b0, t == 0, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
