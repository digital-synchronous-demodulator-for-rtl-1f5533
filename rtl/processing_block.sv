// processing_block -- the demodulator's datapath: two identical 24-bit
// accumulators and the multiplexer that feeds the FIFO.
//
// Both accumulators see the same sample every clock. The first is signed by
// R_C and estimates the cosine coefficient a(t_i); the second is signed by R_S
// and estimates the sine coefficient b(t_i). The control circuit drives the
// shared en/load/dump strobes and the multiplexer select. The 2/N scale factor
// of the Fourier estimate is left to the host: the words are raw sums.
//
// Timing: as data_accumulator; `data` follows `sel` combinationally from the
// held results.
//
// Following the description: the structure (two accumulators, multiplexer).
// This design's choices: which accumulator takes which reference, raw sums
// without scaling.
module processing_block
  import dm_pkg::*;
#(
  parameter int unsigned SW = SAMPLE_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [SW-1:0] sample,
  input  logic                 rc,
  input  logic                 rs,
  input  logic                 en,
  input  logic                 load,
  input  logic                 dump,
  input  logic                 sel,
  output logic signed [AW-1:0] a_result,
  output logic signed [AW-1:0] b_result,
  output logic        [AW-1:0] data
);

  logic signed [AW-1:0] a_sum, b_sum;

  data_accumulator #(.SW(SW), .AW(AW)) u_acc_c (
    .clk, .rst_n, .en, .load, .dump, .sign(rc), .sample,
    .sum(a_sum), .result(a_result)
  );

  data_accumulator #(.SW(SW), .AW(AW)) u_acc_s (
    .clk, .rst_n, .en, .load, .dump, .sign(rs), .sample,
    .sum(b_sum), .result(b_result)
  );

  readout_mux #(.AW(AW)) u_mux (
    .sel, .a(a_result), .b(b_result), .y(data)
  );

endmodule
