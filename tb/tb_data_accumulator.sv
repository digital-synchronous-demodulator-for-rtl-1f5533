// tb_data_accumulator -- self-checking testbench for data_accumulator.
//
// Drives random 12-bit samples and signs, with random load/dump/enable
// patterns, and checks the running sum and the held result against a
// reference model kept in plain integers. Also checks the extreme case of
// 3200 samples of -2048 with sign -1 (16 periods at 50 kHz), whose sum
// 6,553,600 must fit the 24-bit accumulator.
module tb_data_accumulator;
  import dm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, load, dump, sign;
  logic signed [SAMPLE_W-1:0] sample;
  logic signed [ACC_W-1:0] sum, result;
  int checks = 0, failures = 0;
  longint m_sum, m_result;

  data_accumulator dut (.clk, .rst_n, .en, .load, .dump, .sign, .sample, .sum, .result);

  always #50 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic step();
    longint t;
    @(posedge clk);
    t = sign ? longint'(sample) : -longint'(sample);
    if (dump) m_result = m_sum;
    if (en) m_sum = (load ? 0 : m_sum) + t;
    @(negedge clk);
    check(longint'(sum) == m_sum, "sum");
    check(longint'(result) == m_result, "result");
  endtask

  initial begin
    en = 0; load = 0; dump = 0; sign = 0; sample = '0;
    m_sum = 0; m_result = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(sum == 0 && result == 0, "reset");
    for (int i = 0; i < 20000; i++) begin
      sample = SAMPLE_W'($urandom);
      sign   = 1'($urandom);
      en     = ($urandom % 8) != 0;
      load   = ($urandom % 50) == 0;
      dump   = ($urandom % 60) == 0;
      step();
    end
    // worst case magnitude
    en = 1; load = 1; dump = 0; sign = 0; sample = -12'sd2048;
    step();
    load = 0;
    for (int i = 1; i < 3200; i++) step();
    en = 0; dump = 1;
    step();
    check(longint'(result) == 64'sd6553600, "max magnitude");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
