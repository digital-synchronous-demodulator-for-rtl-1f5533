// tb_readout_fifo -- self-checking testbench for readout_fifo at its full
// default depth of 20480 words.
//
// A queue is the reference model. Phases: fill to full (checking `full` and
// that a further write is ignored), drain to empty (checking order, `empty`
// and that a further read is ignored), random simultaneous reads and writes
// across the pointer wrap, and a clear.
module tb_readout_fifo;
  localparam int W = 24;
  localparam int D = 20480;
  localparam int CW = $clog2(D + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  logic expect_valid;
  logic [W-1:0] expect_data;

  readout_fifo dut (.clk, .rst_n, .clr, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .count);

  always #50 clk = ~clk;

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
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one clock with the given strobes; model updated, outputs checked after
  task automatic step(bit w, bit r);
    bit dw, dr;
    wr_en = w; rd_en = r; wr_data = W'($urandom);
    dw = w && (q.size() < D);
    dr = r && (q.size() > 0);
    @(posedge clk);
    expect_valid = dr;
    if (dr) expect_data = q.pop_front();
    if (dw) q.push_back(wr_data);
    @(negedge clk);
    if (expect_valid) check(rd_data == expect_data, "rd_data");
    check(count == CW'(q.size()), "count");
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == D), "full");
  endtask

  initial begin
    clr = 0; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(empty && !full && count == 0, "reset");
    for (int i = 0; i < D; i++) step(1, 0);
    check(full, "full after D writes");
    step(1, 0);                    // ignored
    for (int i = 0; i < D; i++) step(0, 1);
    check(empty, "empty after D reads");
    step(0, 1);                    // ignored
    for (int i = 0; i < 30000; i++) step(($urandom % 100) < 55, ($urandom % 100) < 50);
    // clear
    for (int i = 0; i < 10; i++) step(1, 0);
    clr = 1'b1; wr_en = 0; rd_en = 0;
    @(posedge clk);
    @(negedge clk) clr = 1'b0;
    q.delete();
    check(empty && count == 0, "clear");
    for (int i = 0; i < 100; i++) step(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
