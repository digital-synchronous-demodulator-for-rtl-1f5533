// readout_mux -- the multiplexer that directs the results of both accumulators
// into the FIFO, one 24-bit word at a time.
//
// `sel` low passes the cosine result a(t_i), `sel` high the sine result
// b(t_i). The control circuit writes a then b, so one readout is a 48-bit
// block of two consecutive FIFO words. Purely combinational.
//
// Following the description: a multiplexer between the two accumulators and
// the FIFO. This design's choice: a 24-bit FIFO word and the a-then-b order.
module readout_mux
  import dm_pkg::*;
#(
  parameter int unsigned AW = ACC_W
) (
  input  logic          sel,
  input  logic [AW-1:0] a,
  input  logic [AW-1:0] b,
  output logic [AW-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
