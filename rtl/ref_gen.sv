// ref_gen -- reference signal generator: a digital frequency divider that
// produces the two binary reference functions R_C and R_S.
//
// The divider splits each reference period into four quarters of `quarter`
// clocks. A 2-bit Gray-coded quadrant counter (00, 01, 11, 10) steps once per
// quarter, so its two bits are directly the square waves: rs = ~g[1] is the
// sign of sin (high = +1 in the first half period) and rc = ~g[0] is the sign
// of cos (high = +1 in the first and last quarter). Both outputs come straight
// from flip-flops and so are glitch-free. Reference frequency = f_clk /
// (4 * quarter); with the 10 MHz clock quarter = 26 gives 96.1538 kHz and
// quarter = 17..50 covers 147 kHz down to 50 kHz.
//
// Interface: `quarter` is the setting from the control circuit; a change
// restarts the divider at the beginning of a period. `period_start` is high
// during the first clock of every period (quadrant 0, count 0). `ref_out` is
// the probing square wave; it carries R_S.
//
// Following the description: square-wave references made by frequency
// division, a 50..150 kHz range. This design's choices: the quarter-period
// setting, the Gray quadrant counter, restart on a setting change, R_S as the
// probing output. A setting of 0 behaves as 1.
module ref_gen
  import dm_pkg::*;
#(
  parameter int unsigned QW = QUARTER_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [QW-1:0] quarter,
  output logic          rc,
  output logic          rs,
  output logic          period_start,
  output logic          ref_out
);

  logic [QW-1:0] qcnt;      // clock count inside the current quarter
  logic [1:0]    g;         // Gray-coded quadrant
  logic [QW-1:0] quarter_q; // setting in use
  logic [QW-1:0] last;      // last count value of a quarter

  always_comb last = (quarter == '0) ? '0 : quarter - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcnt      <= '0;
      g         <= 2'b00;
      quarter_q <= '0;
    end else if (quarter != quarter_q) begin
      qcnt      <= '0;
      g         <= 2'b00;
      quarter_q <= quarter;
    end else if (qcnt >= last) begin
      qcnt <= '0;
      unique case (g)
        2'b00:   g <= 2'b01;
        2'b01:   g <= 2'b11;
        2'b11:   g <= 2'b10;
        default: g <= 2'b00;
      endcase
    end else begin
      qcnt <= qcnt + 1'b1;
    end
  end

  assign rs           = ~g[1];
  assign rc           = ~g[0];
  assign period_start = (g == 2'b00) && (qcnt == '0);
  assign ref_out      = rs;

endmodule
