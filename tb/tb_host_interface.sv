// tb_host_interface -- self-checking testbench for host_interface.
//
// The interface is connected to a readout_fifo; the testbench plays the host
// with slow asynchronous strobes (about 6 clocks low, 6 high, edges placed off
// the clock grid). Checked: each write strobe gives exactly one reg_wr pulse
// with the right address and data; settings and status read back through the
// read multiplexer; the word count includes the prefetched word; FIFO words
// are returned as three bytes, least significant first, in order; reading the
// data register with nothing available returns 0 and loses nothing; a FIFO
// clear discards the prefetched word.
module tb_host_interface;
  import dm_pkg::*;

  localparam int DEPTH = 20480;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [HOST_AW-1:0] host_addr;
  logic [HOST_DW-1:0] host_din, host_dout;
  logic host_wr_n, host_rd_n, host_dout_en;
  logic reg_wr;
  logic [HOST_AW-1:0] reg_addr;
  logic [HOST_DW-1:0] reg_wdata;
  dm_cfg_t cfg;
  logic meas_active, overflow, done;
  logic fifo_clr, fifo_empty, fifo_full, fifo_rd_en, fifo_wr;
  logic [CW-1:0] fifo_count;
  logic [ACC_W-1:0] fifo_rd_data, fifo_wr_data;
  int checks = 0, failures = 0;
  int wr_pulses = 0;
  logic [HOST_AW-1:0] last_addr;
  logic [HOST_DW-1:0] last_data;
  logic [ACC_W-1:0] words[$];

  host_interface dut (.*);

  readout_fifo #(.WIDTH(ACC_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clr(fifo_clr), .wr_en(fifo_wr), .wr_data(fifo_wr_data),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(fifo_empty), .full(fifo_full),
    .count(fifo_count)
  );

  always #50 clk = ~clk;

  always @(posedge clk) if (rst_n && reg_wr) begin
    wr_pulses++;
    last_addr <= reg_addr;
    last_data <= reg_wdata;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic host_write(logic [3:0] a, logic [7:0] d);
    #37 host_addr = a; host_din = d;
    #40 host_wr_n = 1'b0;
    #613 host_wr_n = 1'b1;
    #600;
  endtask

  task automatic host_read(logic [3:0] a, output logic [7:0] d);
    #37 host_addr = a;
    #40 host_rd_n = 1'b0;
    #613 check(host_dout_en, "dout_en during read");
    d = host_dout;
    host_rd_n = 1'b1;
    #600;
    check(!host_dout_en, "dout_en idle");
  endtask

  task automatic push_word(logic [ACC_W-1:0] w);
    @(negedge clk);
    fifo_wr = 1'b1; fifo_wr_data = w;
    @(negedge clk);
    fifo_wr = 1'b0;
    words.push_back(w);
  endtask

  task automatic read_count(output int n);
    logic [7:0] lo, hi;
    host_read(REG_COUNT_L, lo);
    host_read(REG_COUNT_H, hi);
    n = {hi, lo};
  endtask

  initial begin
    logic [7:0] d, b0, b1, b2;
    int n;
    host_addr = '0; host_din = '0; host_wr_n = 1; host_rd_n = 1;
    cfg = '{run: 1'b1, mode: TRIG_INT, nper: NPER_8, quarter: 8'd26,
            trig_period: 16'd1761, limit: 16'h1234};
    meas_active = 1; overflow = 0; done = 0; fifo_clr = 0; fifo_wr = 0; fifo_wr_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // writes
    for (int i = 0; i < 8; i++) begin
      automatic logic [3:0] a = 4'($urandom % 6);
      automatic logic [7:0] v = 8'($urandom);
      host_write(a, v);
      check(wr_pulses == i + 1, "one reg_wr per strobe");
      check(last_addr == a && last_data == v, "reg_wr address/data");
    end

    // settings read back
    host_read(REG_CTRL, d);    check(d == {3'b000, NPER_8, TRIG_INT, 1'b1}, "ctrl readback");
    host_read(REG_QUARTER, d); check(d == 8'd26, "quarter readback");
    host_read(REG_TPER_L, d);  check(d == 8'(1761), "tper lo");
    host_read(REG_TPER_H, d);  check(d == 8'(1761 >> 8), "tper hi");
    host_read(REG_LIMIT_L, d); check(d == 8'h34, "limit lo");
    host_read(REG_LIMIT_H, d); check(d == 8'h12, "limit hi");
    host_read(REG_STATUS, d);  check(d == 8'b0000_0100, "status measuring, no data");
    overflow = 1; done = 1; meas_active = 0;
    host_read(REG_STATUS, d);  check(d == 8'b0000_1010, "status overflow, done");
    overflow = 0; done = 0;

    // empty data read
    host_read(REG_DATA, d); check(d == 8'h00, "empty data read");
    read_count(n); check(n == 0, "count empty");

    // stream of words
    for (int i = 0; i < 20; i++) push_word(ACC_W'($urandom));
    repeat (4) @(posedge clk);
    read_count(n); check(n == 20, "count 20");
    host_read(REG_STATUS, d); check(d[0], "status data available");
    for (int i = 0; i < 15; i++) begin
      host_read(REG_DATA, b0);
      host_read(REG_DATA, b1);
      host_read(REG_DATA, b2);
      check({b2, b1, b0} == words.pop_front(), "word bytes");
    end
    read_count(n); check(n == 5, "count 5");
    // interleave with other reads mid-word
    host_read(REG_DATA, b0);
    host_read(REG_STATUS, d);
    host_read(REG_DATA, b1);
    read_count(n);
    host_read(REG_DATA, b2);
    check({b2, b1, b0} == words.pop_front(), "word bytes, interleaved");
    // clear drops the remainder
    @(negedge clk) fifo_clr = 1'b1;
    @(negedge clk) fifo_clr = 1'b0;
    words.delete();
    repeat (3) @(posedge clk);
    read_count(n); check(n == 0, "count after clear");
    host_read(REG_DATA, d); check(d == 8'h00, "data after clear");
    push_word(24'hABCDEF);
    repeat (3) @(posedge clk);
    host_read(REG_DATA, b0); host_read(REG_DATA, b1); host_read(REG_DATA, b2);
    check({b2, b1, b0} == 24'hABCDEF, "word after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
