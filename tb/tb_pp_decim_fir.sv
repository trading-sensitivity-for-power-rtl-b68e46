// tb_pp_decim_fir: random 12-bit samples through the PF1 configuration
// (taps 1 2 1, decimation 2) and the PF2 configuration (taps 1 3 3 1,
// decimation 4). The output is compared every cycle with a direct-form FIR
// computed here from the sample history, divided by the tap sum (floor).
// With the enable low the delay line must hold.
module tb_pp_decim_fir;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               en, in_valid;
  logic signed [11:0] x, y1, y2;
  int checks = 0, failures = 0;

  pp_decim_fir dut1 (.clk, .rst_n, .en, .in_valid, .x, .y(y1));
  pp_decim_fir #(.NTAPS(4), .M(4), .SHIFT(3),
                 .COEF(demod_pkg::PF2_COEF)) dut2 (.clk, .rst_n, .en, .in_valid, .x, .y(y2));

  int hist [$];    // accepted samples, newest first

  function automatic int fdiv(int a, int b);   // floor division
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    int e1, e2;
    en = 1'b1; in_valid = 1'b0; x = '0;
    for (int i = 0; i < 4; i++) hist.push_front(0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4, 0) != 0);
      en       = (cyc % 700) < 600;
      x = (cyc % 1000 < 100) ? ((cyc % 2) ? 12'sd2047 : -12'sd2048) : 12'($urandom);
      #1;
      e1 = fdiv(int'(x) + 2*hist[0] + hist[1], 4);
      e2 = fdiv(int'(x) + 3*hist[0] + 3*hist[1] + hist[2], 8);
      checks += 2;
      if (int'(y1) != e1) begin
        failures++;
        if (failures < 10) $display("FAIL: PF1 cyc %0d y=%0d expected %0d", cyc, y1, e1);
      end
      if (int'(y2) != e2) begin
        failures++;
        if (failures < 10) $display("FAIL: PF2 cyc %0d y=%0d expected %0d", cyc, y2, e2);
      end
      @(posedge clk);
      if (in_valid && en) hist.push_front(int'(x));
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
