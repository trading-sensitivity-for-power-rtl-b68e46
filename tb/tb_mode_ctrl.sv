// tb_mode_ctrl: every operating mode and every direct configuration (all
// eight BFA codes, all BCA and DIA settings) is presented; one clock later
// the registered outputs must show the expected configuration, per-chain
// enables, comparator enables, bypasses and I-chain delay. The expected
// values come from the mode list and the rules written out here.
module tb_mode_ctrl;

  import demod_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] mode;
  logic       cfg_sel;
  cfg_t       cfg_in, cfg;
  chain_ctl_t ictl, qctl;
  logic [2:0] i_delay;
  int checks = 0, failures = 0;

  mode_ctrl dut (.clk, .rst_n, .mode, .cfg_sel, .cfg_in, .cfg, .ictl, .qctl, .i_delay);

  // operating modes as (I on?, bca code, bfa code)
  localparam int MODE_BCA [8] = '{0, 1, 3, 1, 0, 1, 3, 3};
  localparam int MODE_BFA [8] = '{0, 0, 0, 1, 5, 5, 5, 7};

  task automatic check(bit ioff, int b, int f);
    int ef, ed;
    bit ib1, ib2, qb1, qb2;
    ef = (f == 4) ? 0 : f;
    if (ioff && ef >= 4) ef -= 4;
    qb1 = (ef % 4 == 1) || (ef % 4 == 3);
    qb2 = (ef % 4 == 2) || (ef % 4 == 3);
    ib1 = (ef >= 4) && qb1;
    ib2 = (ef >= 4) && qb2;
    ed  = 4 + (ib1 ? 1 : 0) + (ib2 ? 3 : 0) - (qb1 ? 1 : 0) - (qb2 ? 3 : 0);
    checks++;
    if (cfg.dia != dia_e'(ioff) || int'(cfg.bca) != b || int'(cfg.bfa) != ef ||
        ictl.chain_en != !ioff || qctl.chain_en != 1'b1 ||
        ictl.bca_en != (b == 1 || b == 3) || qctl.bca_en != (b == 2 || b == 3) ||
        ictl.byp1 != ib1 || ictl.byp2 != ib2 || qctl.byp1 != qb1 || qctl.byp2 != qb2 ||
        int'(i_delay) != ed) begin
      failures++;
      $display("FAIL: ioff=%0d bca=%0d bfa=%0d -> cfg=%p i=%p q=%p d=%0d (exp d %0d)",
               ioff, b, f, cfg, ictl, qctl, i_delay, ed);
    end
  endtask

  initial begin
    mode = '0; cfg_sel = 1'b0; cfg_in = '0;
    repeat (2) @(posedge clk);
    #1 check(1'b0, 0, 0);      // reset state is mode 0
    rst_n = 1'b1;
    for (int m = 7; m >= 0; m--) begin
      @(negedge clk) mode = 3'(m);
      @(posedge clk) #1 check(1'b0, MODE_BCA[m], MODE_BFA[m]);
    end
    cfg_sel = 1'b1;
    for (int d = 0; d < 2; d++)
      for (int b = 0; b < 4; b++)
        for (int f = 0; f < 8; f++) begin
          @(negedge clk) cfg_in = '{dia: dia_e'(d), bca: bca_e'(b), bfa: bfa_e'(f)};
          mode = 3'($urandom);
          @(posedge clk) #1 check(d[0], b, f);
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
