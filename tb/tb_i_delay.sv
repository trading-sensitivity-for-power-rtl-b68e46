// tb_i_delay: random samples with random gaps in in_valid, random delay
// selections 0..4 and stretches with the enable low. The output must be the
// sample accepted d strobes earlier (the current input for d = 0), and
// nothing may move while the enable is low.
module tb_i_delay;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               en, in_valid;
  logic [2:0]         d;
  logic signed [11:0] x, y;
  int checks = 0, failures = 0;

  i_delay dut (.clk, .rst_n, .en, .in_valid, .d, .x, .y);

  logic signed [11:0] hist [$];   // accepted samples, newest first

  initial begin
    en = 1'b1; in_valid = 1'b0; d = '0; x = '0;
    for (int i = 0; i < 4; i++) hist.push_front(12'sd0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3, 0) != 0);
      en       = (cyc % 500) < 400;
      if (cyc % 37 == 0) d = 3'($urandom_range(4, 0));
      x = 12'($urandom);
      #1;
      checks++;
      if (y != ((d == 0) ? x : hist[d-1])) begin
        failures++;
        if (failures < 10) $display("FAIL: cyc %0d d=%0d y=%0d expected %0d", cyc, d, y,
                                    (d == 0) ? x : hist[d-1]);
      end
      @(posedge clk);
      if (in_valid && en) hist.push_front(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
