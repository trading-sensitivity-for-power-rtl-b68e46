// tb_dia: with the I chain on, samples and chips must pass unchanged; with
// it off, the chain input must be zero and the correlator must see the
// neutral chip value 0, whatever the inputs are.
module tb_dia;

  import demod_pkg::*;

  logic               i_off;
  logic signed [11:0] i_in, i_gated;
  tchip_t             chip_in, chip_out;
  int checks = 0, failures = 0;

  dia dut (.i_off, .i_in, .i_gated, .chip_in, .chip_out);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      i_off   = t[0];
      i_in    = 12'($urandom);
      chip_in = (t % 3 == 0) ? CHIP_N : CHIP_P;
      #1;
      checks += 2;
      if (i_gated != (i_off ? 12'sd0 : i_in)) begin
        failures++;
        if (failures < 10) $display("FAIL: i_off=%0d i_in=%0d i_gated=%0d", i_off, i_in, i_gated);
      end
      if (chip_out != (i_off ? CHIP_Z : chip_in)) begin
        failures++;
        if (failures < 10) $display("FAIL: i_off=%0d chip_in=%0d chip_out=%0d", i_off, chip_in, chip_out);
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
