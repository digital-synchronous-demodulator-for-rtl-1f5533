// data_accumulator -- one 24-bit data accumulator of the processing block.
//
// Each clock with `en` high the signed sample is added to the running sum when
// `sign` is high (reference = +1) and subtracted when it is low (reference =
// -1). This replaces the multiplication by a sine or cosine with a sign
// control. With `load` the sum restarts from the current sample instead of
// adding to it, so a new measurement begins without losing a sample.
// `dump` copies the running sum (before this clock's sample) into `result`,
// where it stays until the next dump; `dump` together with `en` and `load`
// closes one interval and opens the next in the same clock (gapless).
//
// Timing: one clock from sample to sum; `result` is valid the clock after
// `dump`.
//
// Following the description: 24-bit accumulation of 12-bit samples under
// sign control. This design's choices: the load/dump handshake, two's
// complement arithmetic, asynchronous active-low reset. 24 bits cannot wrap:
// 16 periods at 50 kHz are 3200 samples of at most 2048 in magnitude,
// 6,553,600 < 2^23.
module data_accumulator
  import dm_pkg::*;
#(
  parameter int unsigned SW = SAMPLE_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 load,
  input  logic                 dump,
  input  logic                 sign,
  input  logic signed [SW-1:0] sample,
  output logic signed [AW-1:0] sum,
  output logic signed [AW-1:0] result
);

  logic signed [AW-1:0] term;
  logic signed [AW-1:0] base;

  always_comb begin
    term = sign ? AW'(sample) : -AW'(sample);
    base = load ? '0 : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum    <= '0;
      result <= '0;
    end else begin
      if (dump) result <= sum;
      if (en)   sum    <= base + term;
    end
  end

endmodule
