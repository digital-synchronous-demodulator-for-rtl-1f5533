// tb_dm_workloads -- the two operating cases of the demodulator's
// evaluation, run on the full-size design with the same source, monitor and
// host model as tb_dm_processor.
//
// A: the evaluated setting -- 96.1538 kHz reference (quarter = 26), 16
//    periods per measurement, internal trigger every 1761 clocks (0.1761 ms,
//    5.678 kSPS) -- for 1000 readouts, read by the host while the measurement
//    runs, each checked against the monitor and for its 0.1761 ms spacing.
// B: cyclical operation -- 10,000 readouts at the highest rate, 2 periods of a
//    100 kHz reference (quarter = 25), i.e. one readout every 200 clocks =
//    50 kHz, buffered in the FIFO and read afterwards; all must be present,
//    back to back and correct.
module tb_dm_workloads;
  import dm_pkg::*;

  localparam int FIFO_WORDS = 20480;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SAMPLE_W-1:0] adc_data;
  logic ext_trig;
  logic ref_out, ref_c, ref_s, meas_active, readout_strobe;
  logic [HOST_AW-1:0] host_addr;
  logic [HOST_DW-1:0] host_din, host_dout;
  logic host_wr_n, host_rd_n, host_dout_en;
  int checks = 0, failures = 0;

  dm_processor dut (.*);

  always #50 clk = ~clk;   // 10 MHz

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
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

  // ------------------------------------------------------------ signal source
  real    f_sig = 96153.8;
  real    amp   = 1500.0;
  longint cyc   = 0;
  always @(negedge clk) begin
    real v;
    v = amp * $sin(2.0 * 3.14159265358979 * f_sig * real'(cyc) * 1.0e-7)
        + real'(int'($urandom % 9) - 4);
    adc_data <= SAMPLE_W'(2048 + $rtoi(v));
  end

  // ----------------------------------------------------------------- monitor
  longint p_start[$];   // clock of each period start
  longint p_a[$], p_b[$];
  logic   prev_rs = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      longint x;
      x = longint'($signed({~adc_data[SAMPLE_W-1], adc_data[SAMPLE_W-2:0]}));
      if (ref_s && !prev_rs) begin
        p_start.push_back(cyc);
        p_a.push_back(0);
        p_b.push_back(0);
      end
      if (p_start.size() > 0) begin
        p_a[p_a.size()-1] += ref_c ? x : -x;
        p_b[p_b.size()-1] += ref_s ? x : -x;
      end
      prev_rs = ref_s;
    end
  end

  // -------------------------------------------------------------------- host
  task automatic host_write(logic [3:0] a, logic [7:0] d);
    #37 host_addr = a; host_din = d;
    #40 host_wr_n = 1'b0;
    #613 host_wr_n = 1'b1;
    #600;
  endtask

  task automatic host_read(logic [3:0] a, output logic [7:0] d);
    #37 host_addr = a;
    #40 host_rd_n = 1'b0;
    #613 d = host_dout;
    host_rd_n = 1'b1;
    #600;
  endtask

  function automatic logic [7:0] ctrl(bit run, trig_mode_e m, nper_e n, bit clear = 0);
    return {2'b00, clear, n, m, run};
  endfunction

  task automatic read_count(output int n);
    logic [7:0] lo, hi;
    host_read(REG_COUNT_L, lo);
    host_read(REG_COUNT_H, hi);
    n = {hi, lo};
  endtask

  task automatic read_word(output longint w);
    logic [7:0] b0, b1, b2;
    host_read(REG_DATA, b0);
    host_read(REG_DATA, b1);
    host_read(REG_DATA, b2);
    w = longint'($signed({b2, b1, b0}));
  endtask

  // read one readout and find the N-period window it covers, searching from
  // period index `from`; returns the window's first period index or -1
  task automatic read_readout(int n, int from, output int j);
    longint a, b;
    read_word(a);
    read_word(b);
    j = -1;
    for (int s = from; s + n <= p_a.size(); s++) begin
      longint sa = 0, sb = 0;
      for (int k = 0; k < n; k++) begin sa += p_a[s+k]; sb += p_b[s+k]; end
      if (sa == a && sb == b) begin j = s; break; end
    end
    check(j >= 0, "readout equals the sum over whole reference periods");
  endtask

  task automatic wait_status(int bitno);
    logic [7:0] st;
    do begin
      repeat (2000) @(posedge clk);
      host_read(REG_STATUS, st);
    end while (!st[bitno]);
  endtask

  task automatic stop_and_clear();
    host_write(REG_CTRL, ctrl(0, TRIG_CONT, NPER_2, 1'b1));
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int j, jprev, cnt, n_a, n_b;
    logic [7:0] st;
    host_addr = '0; host_din = '0; host_wr_n = 1; host_rd_n = 1; ext_trig = 0;
    n_a = 0; n_b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------- A: 1000 readouts, 16 periods, internal trigger 0.1761 ms
    host_write(REG_QUARTER, 8'd26);
    host_write(REG_TPER_L, 8'(1761));
    host_write(REG_TPER_H, 8'(1761 >> 8));
    host_write(REG_LIMIT_L, 8'(1000));
    host_write(REG_LIMIT_H, 8'(1000 >> 8));
    repeat (300) @(posedge clk);
    host_write(REG_CTRL, ctrl(1, TRIG_INT, NPER_16));
    jprev = -1;
    for (int i = 0; i < 1000; i++) begin
      do read_count(cnt); while (cnt < 2);
      read_readout(16, jprev < 0 ? 0 : jprev + 1, j);
      if (j >= 0) begin
        if (jprev >= 0) begin
          automatic longint d = p_start[j] - p_start[jprev];
          check(d > 1761 - 104 && d < 1761 + 104, "0.1761 ms spacing");
        end
        n_a++;
        jprev = j;
      end
    end
    host_read(REG_STATUS, st);
    check(st[3] && !st[1], "A: done, no overflow");
    stop_and_clear();
    check(n_a == 1000, "A: 1000 readouts");

    // ---------- B: 10000 readouts at 50 kHz into the FIFO
    host_write(REG_QUARTER, 8'd25);
    host_write(REG_LIMIT_L, 8'(10000));
    host_write(REG_LIMIT_H, 8'(10000 >> 8));
    repeat (300) @(posedge clk);
    p_start.delete(); p_a.delete(); p_b.delete();
    host_write(REG_CTRL, ctrl(1, TRIG_CONT, NPER_2));
    wait_status(3);
    host_read(REG_STATUS, st);
    check(!st[1], "B: no overflow");
    read_count(cnt);
    check(cnt == 20000, "B: 10000 readouts buffered");
    jprev = -1;
    for (int i = 0; i < 10000; i++) begin
      read_readout(2, jprev < 0 ? 0 : jprev + 1, j);
      if (j >= 0) begin
        if (jprev >= 0) check(j == jprev + 2, "B: back to back");
        if (i == 0 || j == jprev + 2) n_b++;
        jprev = j;
      end
    end
    check(p_start[jprev + 2] - p_start[jprev - 2 * 9999] == 10000 * 200, "B: 50 kHz readout rate");
    check(n_b == 10000, "B: 10000 readouts");
    $display("workloads: A=%0d readouts, B=%0d readouts", n_a, n_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
