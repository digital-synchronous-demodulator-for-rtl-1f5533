// tb_control_circuit -- self-checking testbench for control_circuit.
//
// The testbench makes its own period_start pulses every P clocks and records,
// clock by clock, when the unit loads (starts) and dumps (ends) a measurement
// and when it writes the FIFO. Checked: in continuous mode, back-to-back
// intervals of exactly N*P clocks for N = 2, 4, 8, 16, each dump in the same
// clock as the next load (gapless), acc_en never dropping, and the a-then-b
// FIFO writes in the two clocks after each dump; in internal mode, one start
// at the first period boundary at or after each timer trigger; in external
// mode, one start per trigger pulse within P+4 clocks; the readout limit and
// `done`; a full FIFO causing a dropped readout and `overflow`, and the clear
// bit resetting it; stopping with run = 0.
module tb_control_circuit;
  import dm_pkg::*;

  localparam int P = 40;
  localparam int DEPTH = 20480;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_wr;
  logic [HOST_AW-1:0] reg_addr;
  logic [HOST_DW-1:0] reg_wdata;
  dm_cfg_t cfg;
  logic period_start, ext_trig;
  logic acc_en, acc_load, acc_dump, mux_sel;
  logic [CW-1:0] fifo_count;
  logic fifo_wr, fifo_clr, meas_active, readout_strobe, overflow, done;
  int checks = 0, failures = 0;

  control_circuit dut (.*);

  always #50 clk = ~clk;

  // period pulses
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign period_start = (cyc % P) == 0;

  // event log (cycle numbers)
  longint loads[$], dumps[$], wr_a[$], wr_b[$], en_gaps;
  always @(posedge clk) if (rst_n) begin
    if (acc_load) loads.push_back(cyc);
    if (acc_dump) dumps.push_back(cyc);
    if (fifo_wr && !mux_sel) wr_a.push_back(cyc);
    if (fifo_wr && mux_sel)  wr_b.push_back(cyc);
    if (meas_active && !acc_en && !acc_dump) en_gaps++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(logic [3:0] a, logic [7:0] d);
    @(negedge clk);
    reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 0;
  endtask

  function automatic logic [7:0] ctrl(bit run, trig_mode_e m, nper_e n, bit clear = 0);
    return {2'b00, clear, n, m, run};
  endfunction

  task automatic clear_logs();
    loads.delete(); dumps.delete(); wr_a.delete(); wr_b.delete(); en_gaps = 0;
  endtask

  task automatic stop();
    wr(REG_CTRL, ctrl(0, TRIG_CONT, NPER_2));
    repeat (3) @(posedge clk);
    check(!meas_active, "stopped");
  endtask

  initial begin
    longint t0, trig_cycle[$];
    int n;
    reg_wr = 0; reg_addr = '0; reg_wdata = '0; ext_trig = 0; fifo_count = '0;
    en_gaps = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(cfg.quarter == 8'd26 && !cfg.run, "reset settings");
    wr(REG_QUARTER, 8'd10);
    check(cfg.quarter == 8'd10, "quarter write");

    // ---------------- continuous mode, all four interval lengths
    for (int code = 0; code < 4; code++) begin
      n = 2 << code;
      clear_logs();
      wr(REG_CTRL, ctrl(1, TRIG_CONT, nper_e'(code)));
      repeat (n * P * 4 + P) @(posedge clk);
      stop();
      check(loads.size() >= 4, "cont loads");
      check(dumps.size() >= 3, "cont dumps");
      check(loads[0] % P == 0, "load on boundary");
      for (int i = 1; i < loads.size(); i++) check(loads[i] - loads[i-1] == n * P, "interval length");
      for (int i = 0; i < dumps.size(); i++) begin
        check(dumps[i] == loads[i+1], "gapless dump/load");
        check(wr_a.size() > i && wr_a[i] == dumps[i] + 1, "write a after dump");
        check(wr_b.size() > i && wr_b[i] == dumps[i] + 2, "write b after a");
      end
      check(en_gaps == 0, "acc_en continuous");
    end

    // ---------------- internal periodic trigger: period 7P+3, N = 2
    clear_logs();
    wr(REG_TPER_L, 8'(7 * P + 3));
    wr(REG_TPER_H, 8'((7 * P + 3) >> 8));
    check(cfg.trig_period == 16'(7 * P + 3), "trig period write");
    @(negedge clk);
    reg_wr = 1; reg_addr = REG_CTRL; reg_wdata = ctrl(1, TRIG_INT, NPER_2);
    @(posedge clk);
    t0 = cyc + 1;   // run_set clock; the timer fires on the clock after
    @(negedge clk) reg_wr = 0;
    repeat (6 * (7 * P + 3)) @(posedge clk);
    stop();
    check(loads.size() >= 5, "int loads");
    for (int i = 0; i < loads.size(); i++) begin
      automatic longint tt = t0 + 1 + i * (7 * P + 3);
      automatic longint expect_start = ((tt + P - 1) / P) * P;
      check(loads[i] == expect_start, "internal trigger start");
    end
    check(dumps.size() == loads.size(), "int one dump per load");

    // ---------------- external trigger, N = 4
    clear_logs();
    trig_cycle.delete();
    wr(REG_CTRL, ctrl(1, TRIG_EXT, NPER_4));
    repeat (10) @(posedge clk);
    check(loads.size() == 0, "no start without trigger");
    for (int i = 0; i < 4; i++) begin
      repeat ($urandom % 50) @(negedge clk);
      ext_trig = 1; trig_cycle.push_back(cyc);
      repeat (3) @(negedge clk);
      ext_trig = 0;
      repeat (5 * P) @(negedge clk);
    end
    stop();
    check(loads.size() == 4, "ext one start per pulse");
    for (int i = 0; i < loads.size() && i < 4; i++) begin
      check(loads[i] > trig_cycle[i] && loads[i] <= trig_cycle[i] + P + 4, "ext start window");
      check(loads[i] % P == 0, "ext start on boundary");
    end

    // ---------------- readout limit
    clear_logs();
    wr(REG_LIMIT_L, 8'd3);
    wr(REG_CTRL, ctrl(1, TRIG_CONT, NPER_2));
    repeat (10 * 2 * P) @(posedge clk);
    check(loads.size() == 3 && dumps.size() == 3, "limit stops after 3");
    check(done, "done");
    check(wr_b.size() == 3, "three readouts written");
    stop();
    check(!done, "done clears with run");
    wr(REG_LIMIT_L, 8'd0);

    // ---------------- overflow
    clear_logs();
    fifo_count = CW'(DEPTH - 1);
    wr(REG_CTRL, ctrl(1, TRIG_CONT, NPER_2));
    repeat (3 * 2 * P + P) @(posedge clk);
    check(dumps.size() >= 2, "overflow dumps");
    check(wr_a.size() == 0 && wr_b.size() == 0, "no write when full");
    check(overflow, "overflow flag");
    fifo_count = CW'(DEPTH - 2);
    clear_logs();
    repeat (2 * P + 2) @(posedge clk);
    check(wr_b.size() == 1, "write when two words free");
    fifo_count = '0;
    wr(REG_CTRL, ctrl(1, TRIG_CONT, NPER_2, 1'b1));
    @(negedge clk);
    check(!overflow, "clear resets overflow");
    stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
