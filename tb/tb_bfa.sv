// tb_bfa: random samples (with gaps in in_valid) through the two-stage
// decimation chain in each of the four bypass settings, reset in between.
// A reference model written here computes the 4 MHz stage-1 outputs (taps
// 1 2 1 / 4, or the raw sample when bypassed, taken at every 2nd input) and
// the 1 MHz stage-2 outputs (taps 1 3 3 1 / 8, or the stage-1 sample when
// bypassed, at every 4th stage-1 output). Each output must match, must
// arrive two clocks after the 8th input of its group, and the decimation
// ratio must be exactly 8. Finally the chain is disabled and its output
// must hold.
module tb_bfa;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               chain_en, byp1, byp2, in_valid, out_valid;
  logic signed [11:0] x, y;
  int checks = 0, failures = 0;

  bfa dut (.clk, .rst_n, .chain_en, .byp1, .byp2, .in_valid, .x, .out_valid, .y);

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  int xs [$];          // accepted inputs, oldest first
  int y1s [$];         // model stage-1 outputs
  int exp_y [$];       // model stage-2 outputs
  longint exp_cyc [$]; // cycle in which each output must be flagged
  longint cycle = 0;
  int n_out;

  always @(posedge clk) cycle++;

  task automatic run_segment(bit b1, bit b2, int ncyc);
    int i, m;
    xs.delete(); y1s.delete(); exp_y.delete(); exp_cyc.delete();
    rst_n = 1'b0; byp1 = b1; byp2 = b2; chain_en = 1'b1; in_valid = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    n_out = 0;
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(5, 0) != 0);
      x = 12'($urandom_range(4095, 0));
      if (in_valid) begin
        xs.push_back(int'(x));
        i = xs.size() - 1;
        if (i % 2 == 1) begin
          int a0, a1, a2;
          a0 = xs[i]; a1 = xs[i-1]; a2 = (i >= 2) ? xs[i-2] : 0;
          y1s.push_back(b1 ? a0 : fdiv(a0 + 2*a1 + a2, 4));
          m = y1s.size() - 1;
          if (m % 4 == 3) begin
            int z0, z1, z2, z3;
            z0 = y1s[m]; z1 = y1s[m-1]; z2 = y1s[m-2]; z3 = y1s[m-3];
            exp_y.push_back(b2 ? z0 : fdiv(z0 + 3*z1 + 3*z2 + z3, 8));
            exp_cyc.push_back(cycle + 2);
          end
        end
      end
      @(posedge clk); #1;
      if (out_valid) begin
        checks += 2;
        if (exp_y.size() == 0) begin
          failures++;
          $display("FAIL: unexpected output");
        end else begin
          int ey; longint ec;
          ey = exp_y.pop_front(); ec = exp_cyc.pop_front();
          if (int'(y) != ey) begin
            failures++;
            if (failures < 10) $display("FAIL: byp=%0d%0d out %0d y=%0d expected %0d", b1, b2, n_out, y, ey);
          end
          if (cycle != ec) begin
            failures++;
            if (failures < 10) $display("FAIL: output %0d at cycle %0d expected %0d", n_out, cycle, ec);
          end
          n_out++;
        end
      end
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (n_out != xs.size() / 8 || exp_y.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs for %0d inputs", n_out, xs.size());
    end
  endtask

  initial begin
    logic signed [11:0] held;
    x = '0;
    for (int b = 0; b < 4; b++) run_segment(b[0], b[1], 2000);
    // disabled chain: output holds
    @(negedge clk);
    chain_en = 1'b0; in_valid = 1'b1;
    held = y;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk) x = 12'($urandom);
      checks++;
      if (y != held) begin
        failures++;
        $display("FAIL: disabled chain output changed");
        break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
