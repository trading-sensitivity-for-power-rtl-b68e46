// tb_bca: exhaustive test of the comparator approximation. Every 12-bit
// input value is applied with the comparator enabled and bypassed; the output
// must be +1024 / -1024 (by sign, zero counting as positive) or the input.
module tb_bca;

  logic               enable;
  logic signed [11:0] x, y;
  int checks = 0, failures = 0;

  bca dut (.enable, .x, .y);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = -2048; v < 2048; v++) begin
        int exp_y;
        enable = e[0];
        x = 12'(v);
        #1;
        if (e == 0)      exp_y = v;
        else if (v >= 0) exp_y = 1024;
        else             exp_y = -1024;
        checks++;
        if (int'(y) != exp_y) begin
          failures++;
          if (failures < 10) $display("FAIL: en=%0d x=%0d y=%0d expected %0d", e, v, y, exp_y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
