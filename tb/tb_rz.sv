// tb_rz: random samples including 0, -1 and the extremes. One cycle after a
// valid sample the chip must be +1 for x >= 0 and -1 for x < 0, out_valid
// must follow in_valid by one cycle, and the chip must hold while en is low.
module tb_rz;

  import demod_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               en, in_valid, out_valid;
  logic signed [11:0] x;
  tchip_t             chip;
  int checks = 0, failures = 0;

  rz dut (.clk, .rst_n, .en, .in_valid, .x, .out_valid, .chip);

  initial begin
    tchip_t exp_chip;
    logic   exp_valid;
    en = 1'b1; in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    exp_chip = CHIP_Z;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid = $urandom_range(1, 0);
      en       = (cyc % 300) < 250;
      case (cyc % 5)
        0: x = 12'sd0;
        1: x = -12'sd1;
        2: x = (cyc % 2) ? 12'sd2047 : -12'sd2048;
        default: x = 12'($urandom);
      endcase
      if (in_valid && en) exp_chip = (int'(x) >= 0) ? CHIP_P : CHIP_N;
      exp_valid = in_valid;
      @(posedge clk); #1;
      checks += 2;
      if (chip != exp_chip) begin
        failures++;
        if (failures < 10) $display("FAIL: cyc %0d chip=%0d expected %0d", cyc, chip, exp_chip);
      end
      if (out_valid != exp_valid) begin
        failures++;
        if (failures < 10) $display("FAIL: cyc %0d out_valid=%0d", cyc, out_valid);
      end
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
