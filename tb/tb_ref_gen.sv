// tb_ref_gen -- self-checking testbench for ref_gen.
//
// For several quarter-period settings (26 = 96.1538 kHz at 10 MHz, 17 and 50 =
// the ends of the 50..150 kHz range, and 1) it follows an independent phase
// counter k = 0 .. 4Q-1 restarted when the setting changes, and checks every
// clock that R_S = (k < 2Q), R_C = (k < Q or k >= 3Q), period_start = (k == 0)
// and ref_out = R_S. It also measures the period from one period_start to the
// next and checks it equals 4Q clocks.
module tb_ref_gen;
  import dm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [QUARTER_W-1:0] quarter;
  logic rc, rs, period_start, ref_out;
  int checks = 0, failures = 0;

  ref_gen dut (.clk, .rst_n, .quarter, .rc, .rs, .period_start, .ref_out);

  always #50 clk = ~clk;  // 10 MHz

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_setting(int q, int nperiods);
    int k, last_start, periods_seen;
    @(negedge clk) quarter = q[QUARTER_W-1:0];
    @(posedge clk);  // restart edge
    k = 0;
    last_start = -1;
    periods_seen = 0;
    for (int cyc = 0; cyc < nperiods * 4 * q; cyc++) begin
      @(negedge clk);
      check(rs == (k < 2 * q), "rs");
      check(rc == ((k < q) || (k >= 3 * q)), "rc");
      check(period_start == (k == 0), "period_start");
      check(ref_out == rs, "ref_out");
      if (period_start) begin
        if (last_start >= 0) check(cyc - last_start == 4 * q, "period length");
        last_start = cyc;
        periods_seen++;
      end
      @(posedge clk);
      k = (k + 1) % (4 * q);
    end
    check(periods_seen == nperiods, "period count");
  endtask

  initial begin
    quarter = 8'd0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_setting(26, 5);
    run_setting(17, 4);
    run_setting(50, 3);
    run_setting(1, 6);
    run_setting(26, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
