// tb_dm_processor -- end-to-end testbench for the demodulator at its default
// size (10 MHz clock, 20480-word FIFO = 10240 readouts).
//
// The testbench plays both the signal source and the host PC. The source is a
// sampled sine near the reference frequency plus noise, given to the ADC port
// in offset binary. An independent monitor watches the ADC port and the two
// reference outputs every clock, cuts time into reference periods (a period
// starts where R_S rises) and keeps, per period, the sums of the samples
// signed by R_C and by R_S. Every readout the host reads back (six bytes:
// a, then b) must equal the sum of N consecutive period records; where it
// starts tells when the measurement ran.
//
// Phases: the evaluated configuration (96.1538 kHz, 16 periods, internal
// trigger every 1761 clocks = 0.1761 ms); 2, 4 and 8 periods back to back;
// gapless continuous measurement read while it runs; external triggering; a
// frequency change to 147 kHz; filling the FIFO to overflow with 50 kHz-rate
// readouts, then clearing it. Each mechanism is counted and must occur.
module tb_dm_processor;
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
    repeat (4_000_000) @(posedge clk);
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
  real    f_sig = 96153.8 + 8.0;   // close to, not equal to, the reference
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

  // mechanism counters
  int n_int_trig = 0, n_ext_trig = 0, n_gapless = 0, n_nper[4] = '{0, 0, 0, 0};
  int n_overflow = 0, n_limit = 0, n_freq = 0, n_clear = 0, n_concurrent = 0;

  initial begin
    int j, jprev, cnt, q;
    logic [7:0] st;
    longint ext_at[$];
    host_addr = '0; host_din = '0; host_wr_n = 1; host_rd_n = 1; ext_trig = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---------- evaluated configuration: 96.1538 kHz, 16 periods, 0.1761 ms
    host_write(REG_QUARTER, 8'd26);
    host_write(REG_TPER_L, 8'(1761));
    host_write(REG_TPER_H, 8'(1761 >> 8));
    host_write(REG_LIMIT_L, 8'd8);
    host_write(REG_LIMIT_H, 8'd0);
    repeat (300) @(posedge clk);
    host_write(REG_CTRL, ctrl(1, TRIG_INT, NPER_16));
    wait_status(3);
    n_limit++;
    read_count(cnt);
    check(cnt == 16, "8 readouts of two words");
    jprev = -1;
    for (int i = 0; i < 8; i++) begin
      read_readout(16, jprev < 0 ? 0 : jprev + 1, j);
      if (j >= 0) begin
        check(p_start[j+16] - p_start[j] == 16 * 104, "16 periods of 104 clocks");
        if (jprev >= 0) begin
          automatic longint d = p_start[j] - p_start[jprev];
          check(d > 1761 - 104 && d < 1761 + 104, "internal trigger spacing 0.1761 ms");
          n_int_trig++;
        end
        jprev = j;
      end
    end
    n_nper[3]++;
    stop_and_clear();
    n_clear++;

    // ---------- 2, 4, 8 periods back to back
    for (int code = 0; code < 3; code++) begin
      automatic int n = 2 << code;
      host_write(REG_LIMIT_L, 8'd5);
      host_write(REG_CTRL, ctrl(1, TRIG_CONT, nper_e'(code)));
      wait_status(3);
      read_count(cnt);
      check(cnt == 10, "5 readouts");
      jprev = -1;
      for (int i = 0; i < 5; i++) begin
        read_readout(n, jprev < 0 ? 0 : jprev + 1, j);
        if (jprev >= 0 && j >= 0) begin
          check(j == jprev + n, "back-to-back windows");
          if (j == jprev + n) n_gapless++;
        end
        jprev = j;
      end
      n_nper[code]++;
      stop_and_clear();
    end

    // ---------- gapless measurement read while running
    host_write(REG_LIMIT_L, 8'd0);
    host_write(REG_CTRL, ctrl(1, TRIG_CONT, NPER_16));
    jprev = -1;
    for (int i = 0; i < 12; i++) begin
      do read_count(cnt); while (cnt < 2);
      check(meas_active, "measuring while the host reads");
      read_readout(16, jprev < 0 ? 0 : jprev + 1, j);
      if (jprev >= 0 && j >= 0) begin
        check(j == jprev + 16, "gapless while reading");
        if (j == jprev + 16) n_concurrent++;
      end
      jprev = j;
    end
    stop_and_clear();

    // ---------- external trigger, 4 periods
    host_write(REG_CTRL, ctrl(1, TRIG_EXT, NPER_4));
    repeat (500) @(posedge clk);
    read_count(cnt);
    check(cnt == 0, "nothing without a trigger");
    for (int i = 0; i < 3; i++) begin
      repeat (100 + $urandom % 300) @(negedge clk);
      ext_trig = 1'b1;
      ext_at.push_back(cyc);
      repeat (5) @(negedge clk);
      ext_trig = 1'b0;
      repeat (1000) @(negedge clk);
    end
    read_count(cnt);
    check(cnt == 6, "one readout per external trigger");
    jprev = -1;
    for (int i = 0; i < 3; i++) begin
      read_readout(4, jprev < 0 ? 0 : jprev + 1, j);
      if (j >= 0) begin
        check(p_start[j] > ext_at[i] && p_start[j] <= ext_at[i] + 104 + 6, "start after trigger");
        n_ext_trig++;
      end
      jprev = j;
    end
    stop_and_clear();

    // ---------- frequency change: quarter 17 = 147 kHz
    host_write(REG_QUARTER, 8'd17);
    repeat (300) @(posedge clk);
    host_write(REG_LIMIT_L, 8'd3);
    host_write(REG_CTRL, ctrl(1, TRIG_CONT, NPER_2));
    wait_status(3);
    for (int i = 0; i < 3; i++) begin
      read_readout(2, 0, j);
      if (j >= 0) begin
        check(p_start[j+1] - p_start[j] == 68 && p_start[j+2] - p_start[j+1] == 68, "68-clock period");
        n_freq++;
      end
    end
    stop_and_clear();

    // ---------- fill the FIFO: 10240 readouts, then overflow
    host_write(REG_LIMIT_L, 8'd0);
    host_write(REG_CTRL, ctrl(1, TRIG_CONT, NPER_2));
    wait_status(1);
    host_read(REG_STATUS, st);
    check(st[1], "overflow flag after the FIFO filled");
    read_count(cnt);
    check(cnt == FIFO_WORDS, "FIFO holds 10240 readouts");
    if (st[1] && cnt == FIFO_WORDS) n_overflow++;
    host_write(REG_CTRL, ctrl(0, TRIG_CONT, NPER_2));
    read_readout(2, 0, j);
    jprev = j;
    read_readout(2, jprev + 1, j);
    check(j == jprev + 2, "first readouts kept in order");
    host_write(REG_CTRL, ctrl(0, TRIG_CONT, NPER_2, 1'b1));
    repeat (5) @(posedge clk);
    read_count(cnt);
    host_read(REG_STATUS, st);
    check(cnt == 0 && !st[1], "clear empties the FIFO and resets overflow");
    n_clear++;

    // ---------- mechanisms
    check(n_int_trig > 0, "internal trigger exercised");
    check(n_ext_trig == 3, "external trigger exercised");
    check(n_gapless > 0, "back-to-back exercised");
    check(n_concurrent > 0, "reading during gapless measurement exercised");
    for (int i = 0; i < 4; i++) check(n_nper[i] > 0, "every period count exercised");
    check(n_overflow > 0, "overflow exercised");
    check(n_limit > 0, "readout limit exercised");
    check(n_freq > 0, "frequency change exercised");
    check(n_clear > 0, "FIFO clear exercised");
    $display("mechanisms: int=%0d ext=%0d gapless=%0d concurrent=%0d nper=%0d/%0d/%0d/%0d overflow=%0d limit=%0d freq=%0d clear=%0d",
             n_int_trig, n_ext_trig, n_gapless, n_concurrent, n_nper[0], n_nper[1], n_nper[2], n_nper[3],
             n_overflow, n_limit, n_freq, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
