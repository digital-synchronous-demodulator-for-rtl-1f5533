// tb_processing_block -- self-checking testbench for processing_block.
//
// Feeds a synthetic tone (a sampled sine of known amplitude and phase) while
// the testbench generates its own quadrature square waves, and runs
// back-to-back intervals of whole periods. At each dump the two held results
// are compared with sums computed by the testbench, and the multiplexer output
// is checked for both select values. Random samples and random strobes follow.
module tb_processing_block;
  import dm_pkg::*;

  localparam int Q = 26;
  localparam int P = 4 * Q;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [SAMPLE_W-1:0] sample;
  logic rc, rs, en, load, dump, sel;
  logic signed [ACC_W-1:0] a_result, b_result;
  logic [ACC_W-1:0] data;
  int checks = 0, failures = 0;
  longint ma, mb, ra, rb;

  processing_block dut (.clk, .rst_n, .sample, .rc, .rs, .en, .load, .dump, .sel,
                        .a_result, .b_result, .data);

  always #50 clk = ~clk;

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
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step();
    @(posedge clk);
    if (dump) begin ra = ma; rb = mb; end
    if (en) begin
      ma = (load ? 0 : ma) + (rc ? longint'(sample) : -longint'(sample));
      mb = (load ? 0 : mb) + (rs ? longint'(sample) : -longint'(sample));
    end
    @(negedge clk);
  endtask

  task automatic check_results();
    check(longint'(a_result) == ra, "a_result");
    check(longint'(b_result) == rb, "b_result");
    sel = 1'b0; #1;
    check(data == ACC_W'(ra), "mux a");
    sel = 1'b1; #1;
    check(data == ACC_W'(rb), "mux b");
  endtask

  initial begin
    real ph;
    int k;
    sample = '0; rc = 1; rs = 1; en = 0; load = 0; dump = 0; sel = 0;
    ma = 0; mb = 0; ra = 0; rb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // tone, intervals of 2, 4, 8 and 16 periods back to back
    k = 0;
    for (int n = 2; n <= 16; n *= 2) begin
      for (int c = 0; c < n * P; c++) begin
        ph     = 2.0 * 3.14159265358979 * real'(k % P) / real'(P) + 0.7;
        sample = SAMPLE_W'($rtoi(1500.0 * $sin(ph)));
        rs     = (k % P) < 2 * Q;
        rc     = ((k % P) < Q) || ((k % P) >= 3 * Q);
        en     = 1'b1;
        load   = (c == 0);
        dump   = (c == 0) && (n > 2);
        step();
        if (dump) check_results();
        k++;
      end
    end
    en = 0; load = 0; dump = 1;
    step();
    check_results();
    // a pure tone must give a non-zero cos and sin estimate
    check(ra != 0 && rb != 0, "tone detected");
    // random stimulus
    dump = 0;
    for (int i = 0; i < 5000; i++) begin
      sample = SAMPLE_W'($urandom);
      rc = 1'($urandom); rs = 1'($urandom);
      en = 1'($urandom); load = ($urandom % 40) == 0; dump = ($urandom % 30) == 0;
      step();
      if (dump) check_results();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
